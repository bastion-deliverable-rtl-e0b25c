// Configuration of the trigger logic that starts and stops an IJTAG instrument.
// The modes are the document's; the encodings and the 16-bit delay fields (system clock
// cycles) are this design's.
package trig_pkg;

  typedef enum logic {
    START_DIRECT,            // run as soon as the trigger source is asserted
    START_DELAYED            // run start_delay cycles after the assertion
  } start_mode_e;

  typedef enum logic [1:0] {
    STOP_TRIGGERED,          // stop when the trigger source is de-asserted
    STOP_TRIG_DELAYED,       // stop stop_delay cycles after the de-assertion
    STOP_MANUAL,             // stay active until a clear command
    STOP_SELF                // stop when the instrument reports it has finished
  } stop_mode_e;

  typedef enum logic [1:0] {
    REARM_SINGLE,            // one execution, then wait for an arm command
    REARM_AUTO,              // armed again right after the execution
    REARM_DELAYED            // armed again rearm_delay cycles after the execution
  } rearm_mode_e;

  typedef struct packed {
    start_mode_e start_mode;
    stop_mode_e  stop_mode;
    rearm_mode_e rearm_mode;
    logic [15:0] start_delay;
    logic [15:0] stop_delay;
    logic [15:0] rearm_delay;
  } trig_cfg_t;

endpackage

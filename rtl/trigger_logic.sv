// Trigger logic of an IJTAG instrument with triggered execution.
//
// The logic watches a trigger source and drives the instrument's trigger signal according
// to a configuration normally held in the instrument's IJTAG data/configuration register:
//  start:  direct (trigger rises in the cycle after the source's rising edge is seen) or
//          delayed by start_delay system clock cycles;
//  stop:   when the source falls, start-delay cycles after it falls (stop_delay), on a
//          clear command (manual) or when the instrument reports done (self-deactivation);
//  re-arm: single-shot (an arm command is needed for the next execution), automatic, or
//          automatic after rearm_delay cycles.
// After reset the logic is disarmed; an arm command (one-cycle pulse) arms it. A clear
// command ends an execution in every stop mode. Only rising edges of the source start an
// execution. armed, trigger and the state are outputs; trigger is registered.
// The modes follow the document; state names, command pulses and cycle timing are this
// design's.
module trigger_logic
  import trig_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  trig_cfg_t cfg,
  input  logic      arm,
  input  logic      clear,
  input  logic      trig_src,
  input  logic      instr_done,
  output logic      trigger,
  output logic      armed
);

  typedef enum logic [2:0] {S_IDLE, S_ARMED, S_START_WAIT, S_ACTIVE, S_STOP_WAIT, S_REARM_WAIT}
    state_e;

  state_e      state, nstate;
  logic        src_q, rise;
  logic [15:0] cnt, ncnt;

  assign rise = trig_src && !src_q;

  // state after an execution ends
  function automatic state_e after_run(input rearm_mode_e m, input logic [15:0] d);
    unique case (m)
      REARM_AUTO:    return S_ARMED;
      REARM_DELAYED: return (d == '0) ? S_ARMED : S_REARM_WAIT;
      default:       return S_IDLE;
    endcase
  endfunction

  always_comb begin
    nstate = state;
    ncnt   = (cnt != '0) ? cnt - 16'd1 : cnt;
    unique case (state)
      S_IDLE: if (arm) nstate = S_ARMED;
      S_ARMED: begin
        if (rise) begin
          if (cfg.start_mode == START_DELAYED && cfg.start_delay != '0) begin
            nstate = S_START_WAIT;
            ncnt   = cfg.start_delay - 16'd1;
          end else begin
            nstate = S_ACTIVE;
          end
        end
      end
      S_START_WAIT: if (cnt == '0) nstate = S_ACTIVE;
      S_ACTIVE: begin
        if (clear) begin
          nstate = after_run(cfg.rearm_mode, cfg.rearm_delay);
          ncnt   = cfg.rearm_delay - 16'd1;
        end else begin
          unique case (cfg.stop_mode)
            STOP_TRIGGERED: if (!trig_src) begin
              nstate = after_run(cfg.rearm_mode, cfg.rearm_delay);
              ncnt   = cfg.rearm_delay - 16'd1;
            end
            STOP_TRIG_DELAYED: if (!trig_src) begin
              if (cfg.stop_delay == '0) begin
                nstate = after_run(cfg.rearm_mode, cfg.rearm_delay);
                ncnt   = cfg.rearm_delay - 16'd1;
              end else begin
                nstate = S_STOP_WAIT;
                ncnt   = cfg.stop_delay - 16'd1;
              end
            end
            STOP_SELF: if (instr_done) begin
              nstate = after_run(cfg.rearm_mode, cfg.rearm_delay);
              ncnt   = cfg.rearm_delay - 16'd1;
            end
            default: ;   // STOP_MANUAL: only clear ends it
          endcase
        end
      end
      S_STOP_WAIT: begin
        if (cnt == '0 || clear) begin
          nstate = after_run(cfg.rearm_mode, cfg.rearm_delay);
          ncnt   = cfg.rearm_delay - 16'd1;
        end
      end
      S_REARM_WAIT: if (cnt == '0) nstate = S_ARMED;
      default: nstate = S_IDLE;
    endcase
    if (arm && state == S_REARM_WAIT) nstate = S_ARMED;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      src_q   <= 1'b0;
      trigger <= 1'b0;
    end else begin
      state   <= nstate;
      cnt     <= ncnt;
      src_q   <= trig_src;
      trigger <= (nstate == S_ACTIVE) || (nstate == S_STOP_WAIT);
    end
  end

  assign armed = (state == S_ARMED);

endmodule

// Self-reconfiguring fault-monitoring subsystem: Fault Manager, TAP, network and monitors.
//
// N = K^H fault-monitoring instruments each report faults (a pulse on fault[i] with an
// error code) through their flag logic into the self-reconfiguring IEEE 1687 network. The
// on-chip Fault Manager drives the TAP of that network with TCK, polls the ErrorFlag and
// localizes every flagged monitor, reporting its index and code on loc_*. The segment of
// SIB_ins (other instruments, not part of this design) is brought out on ins_*.
// Defaults: K = 3, H = 7 (2187 monitors) and a three-bit EMR (two-bit code and a mask), the
// size of the network the document places and routes; K, H and CODE_W can be changed.
// Monitors run on clk, which must be at least as fast as tck.
module srn_system
  import ijtag_pkg::*;
#(
  parameter int unsigned K      = 3,
  parameter int unsigned H      = 7,
  parameter int unsigned CODE_W = 2,
  localparam int unsigned N     = ipow(K, H),
  localparam int unsigned T     = tree_nodes(K, H),
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     tck,
  input  logic                     trst_n,
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             fault,
  input  logic [N-1:0][CODE_W-1:0] fault_code,
  output logic                     ins_tsi,
  input  logic                     ins_fso,
  output logic                     ins_sel,
  output logic                     init_done,
  output logic                     polling,
  output logic                     detect,
  output logic                     loc_valid,
  output logic [IW-1:0]            loc_index,
  output logic [CODE_W-1:0]        loc_code,
  output logic                     loc_done,
  output logic [31:0]              last_scan_len,
  output logic                     error_flag,
  output logic [N-1:0]             mon_flag
);

  logic tms, tdi, tdo;
  tap_state_e tap_state_unused;
  scan_ctl_t  ctl;
  logic [N-1:0]             mask, clear;
  logic [N-1:0][CODE_W-1:0] code;
  logic                     sib0_open_unused;
  logic [T-1:0]             node_open_unused;

  fault_manager #(.K(K), .H(H), .CODE_W(CODE_W)) u_fm (
    .tck, .trst_n, .tms, .tdi, .tdo, .init_done, .polling, .detect,
    .loc_valid, .loc_index, .loc_code, .loc_done, .last_scan_len
  );

  tap_ctrl u_tap (.tck, .trst_n, .tms, .state(tap_state_unused), .ctl);

  srn_network #(.K(K), .H(H), .CODE_W(CODE_W)) u_net (
    .tck, .trst_n, .ctl, .tdi, .tdo, .ins_tsi, .ins_fso, .ins_sel,
    .flag(mon_flag), .code, .mask, .clear, .error_flag,
    .sib0_open(sib0_open_unused), .node_open(node_open_unused)
  );

  for (genvar i = 0; i < N; i++) begin : g_mon
    fault_monitor #(.CODE_W(CODE_W)) u_mon (
      .clk, .rst_n, .fault(fault[i]), .fault_code(fault_code[i]), .mask(mask[i]),
      .clear(clear[i]), .flag(mon_flag[i]), .code(code[i])
    );
  end

endmodule

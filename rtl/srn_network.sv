// Self-reconfiguring IEEE 1687 fault-monitoring network.
//
// Scan path, from tdi to tdo: SIB_ins (its segment holds the other, non-fault instruments and
// is brought out on ins_tsi/ins_fso), SIB0, and the one-bit ErrorFlag register. SIB0's
// segment is a balanced K-ary tree of H levels of modified SIBs; each of the N = K^H leaves
// has the EMR of one fault monitor in its segment. Siblings are chained in index order, so
// the last sibling is scanned out first and a SIB's state bit leaves just ahead of its own
// segment.
// Fault propagation: a leaf SIB's 'open' is its monitor's flag; an inner SIB's 'open' is the
// OR of its children's toopen. A raised flag therefore opens every modified SIB on the way
// to the root without a TCK edge. The ErrorFlag register captures the OR of the first-level
// toopen signals; SIB0 itself is a regular SIB that only the Fault Manager opens. When the
// Fault Manager then opens SIB0 and scans, the self-configured path leads straight to the
// EMRs of the faulty monitors.
// The network is the only data register behind the TAP, so SIB_ins, SIB0 and ErrorFlag are
// always selected.
// Timing tools report one combinational loop per modified SIB through its asynchronous set;
// it is harmless, see the modified SIB description.
module srn_network
  import ijtag_pkg::*;
#(
  parameter int unsigned K      = 3,
  parameter int unsigned H      = 7,
  parameter int unsigned CODE_W = 2,
  localparam int unsigned N     = ipow(K, H),
  localparam int unsigned T     = tree_nodes(K, H)
) (
  input  logic                      tck,
  input  logic                      trst_n,
  input  scan_ctl_t                 ctl,
  input  logic                      tdi,
  output logic                      tdo,
  // segment of SIB_ins (other instruments)
  output logic                      ins_tsi,
  input  logic                      ins_fso,
  output logic                      ins_sel,
  // fault monitors
  input  logic [N-1:0]              flag,
  input  logic [N-1:0][CODE_W-1:0]  code,
  output logic [N-1:0]              mask,
  output logic [N-1:0]              clear,
  // observation
  output logic                      error_flag,
  output logic                      sib0_open,
  output logic [T-1:0]              node_open
);

  logic ins_so, sib0_so, sib0_tsi, sib0_fso, sib0_seg_sel, ef_cap;
  logic ins_open_unused, ef_strobe_unused;
  logic [0:0] ef_upd_unused;

  logic [T-1:0] n_si, n_so, n_tsi, n_fso, n_sel, n_segsel, n_req, n_isopen, n_toopen;

  sib u_sib_ins (
    .tck, .trst_n, .ctl, .sel(1'b1), .si(tdi), .so(ins_so),
    .tsi(ins_tsi), .fso(ins_fso), .seg_sel(ins_sel), .is_open(ins_open_unused)
  );

  sib u_sib0 (
    .tck, .trst_n, .ctl, .sel(1'b1), .si(ins_so), .so(sib0_so),
    .tsi(sib0_tsi), .fso(sib0_fso), .seg_sel(sib0_seg_sel), .is_open(sib0_open)
  );

  assign ef_cap = |n_toopen[K-1:0];

  tdr #(.WIDTH(1)) u_error_flag (
    .tck, .trst_n, .ctl, .sel(1'b1), .si(sib0_so), .so(tdo),
    .cap_in(ef_cap), .upd_out(ef_upd_unused), .upd_strobe(ef_strobe_unused)
  );

  assign error_flag = ef_cap;
  assign node_open  = n_isopen;

  for (genvar l = 1; l <= H; l++) begin : g_level
    localparam int unsigned OFF  = level_offset(K, l);
    localparam int unsigned POFF = (l > 1) ? level_offset(K, l - 1) : 0;
    for (genvar j = 0; j < ipow(K, l); j++) begin : g_node
      localparam int unsigned ID  = OFF + j;
      localparam int unsigned PID = POFF + j / K;

      // select and serial input
      if (l == 1) begin : g_top
        assign n_sel[ID] = sib0_seg_sel;
        if (j % K == 0) begin : g_first
          assign n_si[ID] = sib0_tsi;
        end else begin : g_next
          assign n_si[ID] = n_so[ID-1];
        end
        if (j % K == K - 1) begin : g_last
          assign sib0_fso = n_so[ID];
        end
      end else begin : g_inner
        assign n_sel[ID] = n_segsel[PID];
        if (j % K == 0) begin : g_first
          assign n_si[ID] = n_tsi[PID];
        end else begin : g_next
          assign n_si[ID] = n_so[ID-1];
        end
        if (j % K == K - 1) begin : g_last
          assign n_fso[PID] = n_so[ID];
        end
      end

      // open request
      if (l == H) begin : g_leaf
        emr #(.CODE_W(CODE_W)) u_emr (
          .tck, .trst_n, .ctl, .sel(n_segsel[ID]), .si(n_tsi[ID]), .so(n_fso[ID]),
          .code_in(code[j]), .mask(mask[j]), .clear(clear[j])
        );
        assign n_req[ID] = flag[j];
      end else begin : g_branch
        assign n_req[ID] = |n_toopen[level_offset(K, l + 1) + j * K +: K];
      end

      msib u_msib (
        .tck, .trst_n, .ctl, .sel(n_sel[ID]), .si(n_si[ID]), .so(n_so[ID]),
        .tsi(n_tsi[ID]), .fso(n_fso[ID]), .seg_sel(n_segsel[ID]), .is_open(n_isopen[ID]),
        .open(n_req[ID]), .toopen(n_toopen[ID])
      );
    end
  end

endmodule

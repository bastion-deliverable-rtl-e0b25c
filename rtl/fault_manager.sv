// Fault Manager for the self-reconfiguring fault-monitoring network.
//
// It is the master of the TAP: it drives TMS and TDI and reads TDO, keeping a copy of the TAP
// state (tap_next) to know where the TAP is. Every scan is a DR scan entered from
// Run-Test/Idle or Update-DR: Select-DR, Capture-DR, Shift-DR for each bit (TMS high on the
// last), Exit1-DR, Update-DR. The Fault Manager works in four phases:
//  * initialisation: H+1 scans open SIB0 and then the modified SIBs level by level (ones are
//    shifted in, a zero lands in SIB_ins); one more scan over the whole tree shifts zeros,
//    which unmasks every EMR and closes every SIB;
//  * polling: three-bit scans (ErrorFlag, SIB0, SIB_ins) repeated back to back, seven TCK
//    per loop. ErrorFlag is the first bit out; if it is 1, the fault is detected and the
//    same scan shifts a 1 into SIB0;
//  * localization: one scan over the self-configured path, shifting in zeros. Its length is
//    not known beforehand: the Fault Manager parses the bits as they come out - ErrorFlag,
//    SIB0, then the tree in pre-order with the last sibling first, a 1 meaning the SIB's
//    segment follows - and ends the scan after the SIB_ins bit. Each EMR met yields a report
//    (loc_valid with the monitor index and error code);
//  * back to polling.
// Observation outputs give the length of the last scan and pulse on detection and at the end
// of each localization. The procedure follows the document; the initialisation sequence and
// the parser are this design's own.
module fault_manager
  import ijtag_pkg::*;
#(
  parameter int unsigned K      = 3,
  parameter int unsigned H      = 7,
  parameter int unsigned CODE_W = 2,
  localparam int unsigned N     = ipow(K, H),
  localparam int unsigned T     = tree_nodes(K, H),
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW    = $clog2(H + 2)
) (
  input  logic              tck,
  input  logic              trst_n,
  output logic              tms,
  output logic              tdi,
  input  logic              tdo,
  output logic              init_done,
  output logic              polling,
  output logic              detect,
  output logic              loc_valid,
  output logic [IW-1:0]     loc_index,
  output logic [CODE_W-1:0] loc_code,
  output logic              loc_done,
  output logic [31:0]       last_scan_len
);

  localparam int unsigned L = CODE_W + 1;

  typedef enum logic [2:0] {PH_RESET, PH_INIT, PH_FINAL, PH_POLL, PH_LOC} phase_e;
  typedef enum logic [2:0] {PS_EF, PS_SIB0, PS_NODE, PS_EMR, PS_INS} pstate_e;

  tap_state_e ts;
  phase_e     phase;
  logic [2:0] rcnt;
  logic [LW-1:0] init_j;
  logic [31:0] bitpos, scan_len;
  logic       ef_q;

  pstate_e       pst;
  logic [LW-1:0] lvl;
  logic [CW-1:0] cidx [1:H];
  logic [31:0]   ecnt;
  logic [CODE_W-1:0] code_sh;

  logic in_shift, last_bit;

  assign in_shift = (ts == TAP_SHIFT_DR);

  // length of the current scan for the phases where it is known in advance
  always_comb begin
    unique case (phase)
      PH_INIT:  scan_len = 32'(3 + level_offset(K, 32'(init_j) + 1));
      PH_FINAL: scan_len = 32'(3 + T + N * L);
      default:  scan_len = 32'd3;
    endcase
  end

  assign last_bit = (phase == PH_LOC) ? (pst == PS_INS) : (bitpos == scan_len - 1);

  always_comb begin
    unique case (ts)
      TAP_TLR:      tms = (phase == PH_RESET) && (rcnt != 3'd5);
      TAP_RTI:      tms = 1'b1;
      TAP_SEL_DR:   tms = 1'b0;
      TAP_CAP_DR:   tms = 1'b0;
      TAP_SHIFT_DR: tms = last_bit;
      default:      tms = 1'b1;
    endcase
  end

  always_comb begin
    tdi = 1'b0;
    if (in_shift) begin
      unique case (phase)
        PH_INIT: tdi = !last_bit;
        PH_POLL: tdi = (bitpos == 32'd1) && ef_q;
        default: tdi = 1'b0;
      endcase
    end
  end

  // sibling step of the parser: deepest level at or above lvl with a sibling left
  logic          sib_found;
  logic [LW-1:0] sib_lvl;
  always_comb begin
    sib_found = 1'b0;
    sib_lvl   = '0;
    for (int l = H; l >= 1; l--) begin
      if (!sib_found && (LW'(l) <= lvl) && (cidx[l] != '0)) begin
        sib_found = 1'b1;
        sib_lvl   = LW'(l);
      end
    end
  end

  // index of the monitor whose EMR is being read
  logic [IW-1:0] cur_index;
  always_comb begin
    cur_index = '0;
    for (int l = 1; l <= H; l++) cur_index = IW'(cur_index * K + IW'(cidx[l]));
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ts            <= TAP_TLR;
      phase         <= PH_RESET;
      rcnt          <= '0;
      init_j        <= '0;
      bitpos        <= '0;
      ef_q          <= 1'b0;
      pst           <= PS_EF;
      lvl           <= '0;
      for (int l = 1; l <= H; l++) cidx[l] <= '0;
      ecnt          <= '0;
      code_sh       <= '0;
      init_done     <= 1'b0;
      detect        <= 1'b0;
      loc_valid     <= 1'b0;
      loc_index     <= '0;
      loc_code      <= '0;
      loc_done      <= 1'b0;
      last_scan_len <= '0;
    end else begin
      ts        <= tap_next(ts, tms);
      detect    <= 1'b0;
      loc_valid <= 1'b0;
      loc_done  <= 1'b0;

      if (phase == PH_RESET) begin
        if (rcnt != 3'd5) rcnt <= rcnt + 3'd1;
        else              phase <= PH_INIT;
      end

      // the masks are written by the Update-DR that ends the last initialisation scan
      if (ts == TAP_UPD_DR && phase == PH_POLL) init_done <= 1'b1;

      if (ts == TAP_CAP_DR) begin
        bitpos <= '0;
        pst    <= PS_EF;
        if (phase == PH_POLL) ef_q <= 1'b0;
      end

      if (in_shift) begin
        bitpos <= bitpos + 32'd1;
        if (phase == PH_POLL && bitpos == 32'd0 && tdo) begin
          ef_q   <= 1'b1;
          detect <= 1'b1;
        end

        // localization parser
        if (phase == PH_LOC) begin
          unique case (pst)
            PS_EF:   pst <= PS_SIB0;
            PS_SIB0: begin
              if (tdo) begin
                pst     <= PS_NODE;
                lvl     <= LW'(1);
                cidx[1] <= CW'(K - 1);
              end else begin
                pst <= PS_INS;
              end
            end
            PS_NODE: begin
              if (tdo && lvl != LW'(H)) begin
                lvl <= lvl + LW'(1);
                for (int l = 1; l <= H; l++)
                  if (LW'(l) == lvl + LW'(1)) cidx[l] <= CW'(K - 1);
              end else if (tdo) begin
                pst  <= PS_EMR;
                ecnt <= '0;
              end else if (sib_found) begin
                lvl <= sib_lvl;
                for (int l = 1; l <= H; l++)
                  if (LW'(l) == sib_lvl) cidx[l] <= cidx[l] - CW'(1);
              end else begin
                pst <= PS_INS;
              end
            end
            PS_EMR: begin
              if (ecnt == 32'(CODE_W)) begin
                loc_valid <= 1'b1;
                loc_index <= cur_index;
                loc_code  <= code_sh;
                if (sib_found) begin
                  pst <= PS_NODE;
                  lvl <= sib_lvl;
                  for (int l = 1; l <= H; l++)
                    if (LW'(l) == sib_lvl) cidx[l] <= cidx[l] - CW'(1);
                end else begin
                  pst <= PS_INS;
                end
              end else begin
                code_sh <= {tdo, code_sh[CODE_W-1:1]};
                ecnt    <= ecnt + 32'd1;
              end
            end
            default: pst <= PS_INS;
          endcase
        end

        // end of scan: choose the next one
        if (last_bit) begin
          last_scan_len <= bitpos + 32'd1;
          unique case (phase)
            PH_INIT:  if (init_j == LW'(H)) phase <= PH_FINAL; else init_j <= init_j + LW'(1);
            PH_FINAL: phase <= PH_POLL;
            PH_POLL:  if (ef_q || (bitpos == 32'd0 && tdo)) phase <= PH_LOC;
            PH_LOC:   begin phase <= PH_POLL; loc_done <= 1'b1; end
            default:  ;
          endcase
        end
      end
    end
  end

  assign polling = (phase == PH_POLL);

endmodule

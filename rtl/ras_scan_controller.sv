// On-chip scan controller of the Cocktail random access scan.
//
// Runs the two test phases from one tester pin.
//  * SRST (first phase), for each of num_seeds seeds: the address register
//    counts while N seed bits are written to cells 0..N-1, one per cycle;
//    then test_len capture cycles let the circuit's responses become the
//    next patterns (segmented random patterns), with the compactor observing.
//  * RAS (second phase), for each of num_ras patterns: an FCW-bit count of
//    bit flips, then per flip AW address bits shifted into the address
//    register and one datum bit; the datum is written in a further cycle, so
//    a flip costs AW+1 tester bits and AW+2 cycles. Then one cycle in which
//    the compactor samples the responses; the cells do not capture them
//    (Test Response Abandonment).
// Internally: counters for scan-in bits, test length, seeds, patterns and
// flips, and the address-clock (ACLK) and scan-clock (SCLK) enables.
//
// Interface and timing: start (one cycle) begins the test; a tester bit moves
// when si_valid and si_ready are both high; si_ready is low in the cycles that
// need no tester bit (writes, captures). done stays high at the end until the
// next start.
// The two phases, the counter-mode seed load, the per-flip cost and the
// abandonment of responses follow the document; the flip-count field that
// ends each RAS pattern and the configuration inputs are this design's
// choices.
module ras_scan_controller
  import lpt_pkg::*;
#(
  parameter int unsigned N   = 1636,
  parameter int unsigned AW  = $clog2(N),
  parameter int unsigned FCW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   num_seeds,
  input  logic [15:0]   test_len,
  input  logic [15:0]   num_ras,
  input  logic          si,
  input  logic          si_valid,
  output logic          si_ready,
  // to the address register, decoder, cells and compactor
  output logic          asr_clr,
  output logic          asr_en,
  output logic          asr_mode,
  output logic          dec_en,
  output logic          sclk_en,
  output logic          cell_din,
  output logic          capture,
  output logic          misr_clr,
  output logic          misr_en,
  output ras_phase_e    phase,
  output logic          done
);

  typedef enum logic [3:0] {
    C_IDLE, C_SCAN, C_SCAP, C_RCNT, C_RADDR, C_RDATA, C_RWRITE, C_RCAP, C_DONE
  } cstate_e;

  cstate_e        st;
  logic [15:0]    bits;     // scan-in bits / field bits left
  logic [15:0]    tl_left;  // capture cycles left in this segment
  logic [15:0]    seeds_left, pats_left;
  logic [FCW-1:0] flips_left;
  logic [FCW-2:0] fshift;   // flip count received so far
  logic           datum;
  logic           acc;

  always_comb begin
    unique case (st)
      C_SCAN, C_RCNT, C_RADDR, C_RDATA: si_ready = 1'b1;
      default:                          si_ready = 1'b0;
    endcase
  end
  assign acc = si_valid && si_ready;

  assign asr_mode = (st == C_SCAN);
  assign asr_en   = acc && (st == C_SCAN || st == C_RADDR);
  assign dec_en   = (st == C_SCAN) || (st == C_RWRITE);
  assign sclk_en  = (acc && st == C_SCAN) || (st == C_RWRITE);
  assign cell_din = (st == C_SCAN) ? si : datum;
  assign capture  = (st == C_SCAP);
  assign misr_en  = (st == C_SCAP) || (st == C_RCAP);
  assign misr_clr = start;
  assign done     = (st == C_DONE);
  // the address register restarts at cell 0 for every seed
  assign asr_clr  = start || (acc && st == C_SCAN && bits == 16'd1);

  always_comb begin
    unique case (st)
      C_SCAN, C_SCAP:                              phase = PH_SRST;
      C_RCNT, C_RADDR, C_RDATA, C_RWRITE, C_RCAP:  phase = PH_RAS;
      C_DONE:                                      phase = PH_DONE;
      default:                                     phase = PH_IDLE;
    endcase
  end

  // state after the SRST phase, or after the last flip of a pattern
  function automatic cstate_e after_srst(input logic [15:0] nras);
    return (nras == 16'd0) ? C_DONE : C_RCNT;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= C_IDLE;
      bits       <= '0;
      tl_left    <= '0;
      seeds_left <= '0;
      pats_left  <= '0;
      flips_left <= '0;
      fshift     <= '0;
      datum      <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE, C_DONE: if (start) begin
          seeds_left <= num_seeds;
          pats_left  <= num_ras;
          bits       <= 16'(N);
          fshift     <= '0;
          if (num_seeds != 16'd0) st <= C_SCAN;
          else begin
            st   <= after_srst(num_ras);
            bits <= 16'(FCW);
          end
        end

        C_SCAN: if (acc) begin
          bits <= bits - 1'b1;
          if (bits == 16'd1) begin
            tl_left <= test_len;
            if (test_len != 16'd0) st <= C_SCAP;
            else if (seeds_left != 16'd1) begin
              seeds_left <= seeds_left - 1'b1;
              bits       <= 16'(N);
            end else begin
              st   <= after_srst(pats_left);
              bits <= 16'(FCW);
            end
          end
        end

        C_SCAP: begin
          tl_left <= tl_left - 1'b1;
          if (tl_left == 16'd1) begin
            seeds_left <= seeds_left - 1'b1;
            if (seeds_left != 16'd1) begin
              st   <= C_SCAN;
              bits <= 16'(N);
            end else begin
              st   <= after_srst(pats_left);
              bits <= 16'(FCW);
            end
          end
        end

        C_RCNT: if (acc) begin
          fshift <= {fshift[FCW-3:0], si};
          bits   <= bits - 1'b1;
          if (bits == 16'd1) begin
            flips_left <= {fshift[FCW-2:0], si};
            fshift     <= '0;
            if ({fshift[FCW-2:0], si} == '0) st <= C_RCAP;
            else begin
              st   <= C_RADDR;
              bits <= 16'(AW);
            end
          end
        end

        C_RADDR: if (acc) begin
          bits <= bits - 1'b1;
          if (bits == 16'd1) st <= C_RDATA;
        end

        C_RDATA: if (acc) begin
          datum <= si;
          st    <= C_RWRITE;
        end

        C_RWRITE: begin
          flips_left <= flips_left - 1'b1;
          if (flips_left == FCW'(1)) st <= C_RCAP;
          else begin
            st   <= C_RADDR;
            bits <= 16'(AW);
          end
        end

        C_RCAP: begin
          pats_left <= pats_left - 1'b1;
          if (pats_left == 16'd1) st <= C_DONE;
          else begin
            st   <= C_RCNT;
            bits <= 16'(FCW);
          end
        end

        default: st <= C_IDLE;
      endcase
    end
  end

  // Only one scan cell may be written per cycle, and never during capture.
  assert property (@(posedge clk) disable iff (!rst_n) !(sclk_en && capture));

endmodule

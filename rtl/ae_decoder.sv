// Adaptive Encoding decoder machine.
//
// A tester sends, over one scan-in pin, the difference between the pattern in
// the embedded memory and the next pattern, cut into packets of variable size.
// For each pattern the decoder
//   1. reads three header fields: the number of packets (NPKT_W bits), the
//      width of the difference-address field and the width of the
//      data-length field (HDR_W bits each);
//   2. for every packet reads a difference address (the number of unchanged
//      bits skipped since the end of the previous packet), a data length
//      (stored as length-1) and that many data bits. An adder accumulates the
//      bit address; its upper bits select a memory block and its lower bits,
//      the offset, select the buffer flip-flop that takes the next data bit.
//      When the buffer reaches the end of a block or the packet ends, the
//      block is read, XORed with the buffer and written back (two cycles);
//      a long packet simply continues into the next block;
//   3. unloads the memory, one M-bit block per cycle, onto M scan chains and
//      pulses capture.
// In random mode (first test phase) it instead takes M seed bits and drives
// them on the chains for every one of the N_BITS/M shift cycles, so each
// chain is filled with a single value.
//
// Interface: si/si_valid/si_ready is the tester stream (a bit moves when both
// valid and ready are high). si_ready drops for one cycle after each block
// update and during step 3, so a tester running at half the system clock or
// slower never waits inside step 2. scan_out/scan_en drive the chains (chain j
// takes scan_out[j] when scan_en is high); pattern bit a reaches chain a%M in
// shift cycle a/M. capture is a one-cycle pulse after the last shift.
// After reset the decoder spends N_BITS/M cycles writing zeros to the memory,
// so the first pattern is coded against an all-zero pattern.
//
// The packet format, the adder, the block/offset split, the buffer with its
// offset decoder, the XOR update and the three steps follow the document.
// The field widths of the header, the bit order (MSB first), the order of
// pattern bits on the chains, the memory clear and the random-mode pin are
// this design's choices.
module ae_decoder #(
  parameter int unsigned N_BITS = 2048,
  parameter int unsigned M      = 16,
  parameter int unsigned NPKT_W = 8,
  parameter int unsigned HDR_W  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // tester stream
  input  logic                          si,
  input  logic                          si_valid,
  output logic                          si_ready,
  input  logic                          random_mode,
  // scan chains
  output logic [M-1:0]                  scan_out,
  output logic                          scan_en,
  output logic                          capture,
  // embedded memory
  output logic                          mem_rd_en,
  output logic [$clog2(N_BITS/M)-1:0]   mem_rd_addr,
  input  logic [M-1:0]                  mem_rd_data,
  output logic                          mem_wr_en,
  output logic [$clog2(N_BITS/M)-1:0]   mem_wr_addr,
  output logic [M-1:0]                  mem_wr_data
);

  localparam int unsigned NB    = N_BITS / M;
  localparam int unsigned BW    = $clog2(NB);
  localparam int unsigned OW    = $clog2(M);
  localparam int unsigned ABITS = $clog2(N_BITS);
  localparam int unsigned FW    = (NPKT_W > ABITS + 1) ? NPKT_W : ABITS + 1;
  // wide enough for the M seed bits of random mode and for every field width
  localparam int unsigned CW    = ($clog2(M + 1) > 8) ? $clog2(M + 1) : 8;

  typedef enum logic [3:0] {
    S_INIT, S_START, S_NP, S_AW, S_LW, S_ADDR, S_LEN, S_DATA,
    S_UNLOAD, S_RSEED, S_RSHIFT, S_CAP
  } state_e;

  state_e              state;
  logic [CW-1:0]       cnt;        // bits left in the current field or seed
  logic [FW-2:0]       shreg;      // field being received (all but the newest bit)
  logic [NPKT_W-1:0]   npkt;       // packets left in this pattern
  logic [HDR_W-1:0]    aw_w, lw_w; // widths of difference address and data length
  logic [ABITS-1:0]    addr;       // accumulated bit address
  logic [ABITS:0]      len_left;   // data bits left in this packet
  logic [M-1:0]        bufr;       // decoding buffer
  logic [BW:0]         blk;        // block counter for init, unload, random shift
  logic                flush_busy; // second cycle of a block update
  logic [M-1:0]        pend_buf;
  logic [BW-1:0]       pend_blk;
  logic                rd_valid;   // unload read returns this cycle

  logic                acc;
  logic [FW-1:0]       field_val;
  logic [OW-1:0]       off;
  logic [M-1:0]        buf_next;
  logic                flush_now;
  logic                unload_rd;

  always_comb begin
    unique case (state)
      S_NP, S_AW, S_LW, S_ADDR, S_LEN, S_DATA, S_RSEED: si_ready = !flush_busy;
      default:                                          si_ready = 1'b0;
    endcase
  end

  assign acc       = si_valid && si_ready;
  assign field_val = {shreg, si};
  assign off       = addr[OW-1:0];

  always_comb begin
    buf_next      = bufr;
    buf_next[off] = si;
  end

  assign flush_now = acc && (state == S_DATA) && ((off == OW'(M - 1)) || (len_left == 1));
  assign unload_rd = (state == S_UNLOAD) && !flush_busy && (blk < (BW+1)'(NB));

  // memory ports
  assign mem_rd_en   = flush_now || unload_rd;
  assign mem_rd_addr = flush_now ? addr[ABITS-1:OW] : blk[BW-1:0];
  assign mem_wr_en   = flush_busy || (state == S_INIT);
  assign mem_wr_addr = (state == S_INIT) ? blk[BW-1:0] : pend_blk;
  assign mem_wr_data = (state == S_INIT) ? '0 : (mem_rd_data ^ pend_buf);

  // scan chain side
  assign scan_en  = rd_valid || (state == S_RSHIFT);
  assign scan_out = (state == S_RSHIFT) ? bufr : mem_rd_data;
  assign capture  = (state == S_CAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      cnt        <= '0;
      shreg      <= '0;
      npkt       <= '0;
      aw_w       <= '0;
      lw_w       <= '0;
      addr       <= '0;
      len_left   <= '0;
      bufr       <= '0;
      blk        <= '0;
      flush_busy <= 1'b0;
      pend_buf   <= '0;
      pend_blk   <= '0;
      rd_valid   <= 1'b0;
    end else begin
      flush_busy <= flush_now;
      rd_valid   <= unload_rd;
      if (flush_now) begin
        pend_buf <= buf_next;
        pend_blk <= addr[ABITS-1:OW];
      end

      unique case (state)
        S_INIT: begin
          blk <= blk + 1'b1;
          if (blk == (BW+1)'(NB - 1)) state <= S_START;
        end

        S_START: begin
          shreg <= '0;
          addr  <= '0;
          bufr  <= '0;
          blk   <= '0;
          if (random_mode) begin
            state <= S_RSEED;
            cnt   <= CW'(M);
          end else begin
            state <= S_NP;
            cnt   <= CW'(NPKT_W);
          end
        end

        S_NP: if (acc) begin
          shreg <= field_val[FW-2:0];
          cnt   <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            npkt  <= field_val[NPKT_W-1:0];
            shreg <= '0;
            state <= S_AW;
            cnt   <= CW'(HDR_W);
          end
        end

        S_AW: if (acc) begin
          shreg <= field_val[FW-2:0];
          cnt   <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            aw_w  <= field_val[HDR_W-1:0];
            shreg <= '0;
            state <= S_LW;
            cnt   <= CW'(HDR_W);
          end
        end

        S_LW: if (acc) begin
          shreg <= field_val[FW-2:0];
          cnt   <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            lw_w  <= field_val[HDR_W-1:0];
            shreg <= '0;
            if (npkt == '0) begin
              state <= S_UNLOAD;
            end else if (aw_w != '0) begin
              state <= S_ADDR;
              cnt   <= CW'(aw_w);
            end else if (field_val[HDR_W-1:0] != '0) begin
              state <= S_LEN;
              cnt   <= CW'(field_val[HDR_W-1:0]);
            end else begin
              state    <= S_DATA;
              len_left <= (ABITS+1)'(1);
            end
          end
        end

        S_ADDR: if (acc) begin
          shreg <= field_val[FW-2:0];
          cnt   <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            addr  <= addr + field_val[ABITS-1:0];
            shreg <= '0;
            if (lw_w != '0) begin
              state <= S_LEN;
              cnt   <= CW'(lw_w);
            end else begin
              state    <= S_DATA;
              len_left <= (ABITS+1)'(1);
            end
          end
        end

        S_LEN: if (acc) begin
          shreg <= field_val[FW-2:0];
          cnt   <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            len_left <= field_val[ABITS:0] + 1'b1;
            shreg    <= '0;
            state    <= S_DATA;
          end
        end

        S_DATA: if (acc) begin
          addr     <= addr + 1'b1;
          len_left <= len_left - 1'b1;
          bufr     <= flush_now ? '0 : buf_next;
          if (len_left == 1) begin
            npkt <= npkt - 1'b1;
            if (npkt == NPKT_W'(1)) begin
              state <= S_UNLOAD;
              blk   <= '0;
            end else if (aw_w != '0) begin
              state <= S_ADDR;
              cnt   <= CW'(aw_w);
            end else if (lw_w != '0) begin
              state <= S_LEN;
              cnt   <= CW'(lw_w);
            end else begin
              len_left <= (ABITS+1)'(1);
            end
          end
        end

        S_UNLOAD: begin
          if (unload_rd) blk <= blk + 1'b1;
          if (blk == (BW+1)'(NB)) state <= S_CAP;
        end

        S_RSEED: if (acc) begin
          bufr <= {si, bufr[M-1:1]};
          cnt  <= cnt - 1'b1;
          if (cnt == CW'(1)) state <= S_RSHIFT;
        end

        S_RSHIFT: begin
          blk <= blk + 1'b1;
          if (blk == (BW+1)'(NB - 1)) state <= S_CAP;
        end

        S_CAP: begin
          blk   <= '0;
          state <= S_START;
        end

        default: state <= S_START;
      endcase
    end
  end

  // A block update must never be asked for while the previous one is writing.
  assert property (@(posedge clk) disable iff (!rst_n) flush_busy |-> !flush_now);

endmodule

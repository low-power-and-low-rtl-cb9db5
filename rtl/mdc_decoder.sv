// Multilayer Data Copy (MDC) decoder for designs with many scan chains.
//
// Decompresses a one-pin stream into slices of A bits, one bit per scan
// chain. The stream alternates control bits and raw data. With c bits of the
// current slice loaded, the current layer is the lowest layer whose group
// size divides c (layer 0 when c = 0). At that layer a control bit 1 means
// Copy: the last GS[layer] bits are repeated and c grows by GS[layer]. A 0
// moves to the next layer; a 0 at the last layer means Shift: the next
// GS[L-1] stream bits are raw data shifted into the buffer. When c reaches A
// the slice is complete and the scan chains shift once; after CHAIN_LEN
// slices the pattern is complete and capture pulses.
// Example (8-4-2 buffer, the 16-bit cube of the document): 000 01 1 1 loads
// "01", copies it at layer 3 and layer 2, and the final 1 copies the whole
// slice at layer 1.
//
// Interface and timing: one stream bit is taken per clock when in_valid and
// in_ready are high; a copy happens in the cycle of its control bit, so the
// tester never waits, except for one cycle at the end of each pattern
// (in_ready is low while the last slice shifts, and capture follows in the
// next cycle, so a slice shift can never coincide with capture).
// scan_en is high for one cycle per slice, with the slice on `slice`.
// copy_done/copy_layer report each Copy for power and compression monitors.
// The Copy/Shift coding, the layer counter and the slice counter follow the
// document; the end-of-pattern handshake is this design's choice.
module mdc_decoder #(
  parameter int unsigned L         = 3,
  parameter int unsigned GS [L]    = '{100, 20, 4},
  parameter int unsigned A         = GS[0],
  parameter int unsigned CHAIN_LEN = 67
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_bit,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic [A-1:0]         slice,
  output logic                 scan_en,
  output logic                 capture,
  output logic                 copy_done,
  output logic [$clog2(L)-1:0] copy_layer
);

  localparam int unsigned CW  = $clog2(A + 1);
  localparam int unsigned LW  = $clog2(L);
  localparam int unsigned KW  = $clog2(GS[L-1] + 1);
  localparam int unsigned SCW = $clog2(CHAIN_LEN + 1);

  logic [CW-1:0]  cnt;        // bits of the current slice already loaded
  logic [LW-1:0]  lv;         // current layer
  logic           in_data;    // receiving raw data of a Shift
  logic [KW-1:0]  k_left;     // raw bits still to come
  logic [SCW-1:0] slices;     // slices of the current pattern already shifted
  logic           last_slice; // the slice shifting now ends the pattern

  logic           acc, do_copy, do_shift;
  logic [CW-1:0]  cnt_next;

  // Layer for a slice-bit count: the lowest layer whose group size divides it.
  function automatic logic [LW-1:0] layer_of(input logic [CW-1:0] c);
    logic [LW-1:0] r = '0;
    for (int i = int'(L) - 1; i >= 0; i--) begin
      if ((int'(c) % int'(GS[i])) == 0) r = LW'(i);
    end
    return r;
  endfunction

  function automatic logic [CW-1:0] gsize(input logic [LW-1:0] l);
    logic [CW-1:0] r = '0;
    for (int unsigned i = 0; i < L; i++) if (l == LW'(i)) r = CW'(GS[i]);
    return r;
  endfunction

  assign in_ready = !(scan_en && last_slice);
  assign acc      = in_valid && in_ready;
  assign do_copy  = acc && !in_data && in_bit;
  assign do_shift = acc && in_data;
  assign cnt_next = do_copy ? cnt + gsize(lv) : cnt + 1'b1;
  assign copy_done  = do_copy;
  assign copy_layer = lv;

  mdc_decoding_buffer #(.L(L), .GS(GS), .A(A)) u_buf (
    .clk, .rst_n, .shift(do_shift), .din(in_bit), .copy(do_copy), .copy_lv(lv), .q(slice)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      lv         <= '0;
      in_data    <= 1'b0;
      k_left     <= '0;
      slices     <= '0;
      last_slice <= 1'b0;
      scan_en    <= 1'b0;
      capture    <= 1'b0;
    end else begin
      scan_en <= 1'b0;
      capture <= scan_en && last_slice;
      if (acc) begin
        if (!in_data && !in_bit) begin
          // no Copy at this layer: go one layer down, or start a Shift
          if (lv == LW'(L - 1)) begin
            in_data <= 1'b1;
            k_left  <= KW'(GS[L-1]);
          end else begin
            lv <= lv + 1'b1;
          end
        end else begin
          // a Copy, or one raw bit of a Shift
          if (in_data) k_left <= k_left - 1'b1;
          if (!in_data || k_left == KW'(1)) begin
            in_data <= 1'b0;
            if (cnt_next == CW'(A)) begin
              cnt        <= '0;
              lv         <= '0;
              scan_en    <= 1'b1;
              last_slice <= (slices == SCW'(CHAIN_LEN - 1));
              slices     <= (slices == SCW'(CHAIN_LEN - 1)) ? '0 : slices + 1'b1;
            end else begin
              cnt <= cnt_next;
              lv  <= layer_of(cnt_next);
            end
          end else begin
            cnt <= cnt_next;
          end
        end
      end
    end
  end

  // Group sizes must nest and the top layer must span the buffer.
  initial begin
    assert (GS[0] == A) else $error("GS[0] must equal A");
    for (int i = 1; i < int'(L); i++) assert (GS[i-1] % GS[i] == 0) else $error("group sizes must divide");
  end

  // A slice shift and capture are never in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(scan_en && capture));

endmodule

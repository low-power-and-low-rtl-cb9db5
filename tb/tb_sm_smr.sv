// Self-checking testbench for the SMR scan cell, both polarities.
//
// Random control and data are compared each cycle with a model: the
// pre-latch is written only when shift, sel and row are all high, so passes
// si when sel is low and the (polarity-corrected) master value when sel is
// high, update copies the pre-latch and capture loads d. A negative cell is
// checked behind an inverter, as it sits in the matrix, so both cells must
// store and show the true value.
module tb_sm_smr;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic sel, row, shift, update, capture, si, d;
  logic so_p, so_n, q_p, q_n;
  logic m_pre, m_q_p, m_q_n;

  sm_smr #(.NEG(1'b0)) u_p (.clk, .sel, .row, .shift, .update, .capture,
                            .si, .so(so_p), .d, .q(q_p));
  sm_smr #(.NEG(1'b1)) u_n (.clk, .sel, .row, .shift, .update, .capture,
                            .si(~si), .so(so_n), .d, .q(q_n));

  int checks = 0, failures = 0;

  initial begin
    sel = 0; row = 0; shift = 0; update = 0; si = 0; d = 0;
    capture = 1;            // give both masters a known value
    @(posedge clk); #1;
    m_q_p = d; m_q_n = d; m_pre = 1'bx;
    sel = 1; row = 1; shift = 1; capture = 0;   // and both pre-latches
    @(posedge clk); #1;
    m_pre = si;
    for (int t = 0; t < 2000; t++) begin
      sel = 1'($urandom_range(1)); row = 1'($urandom_range(1));
      shift = 1'($urandom_range(1)); update = ($urandom_range(3) == 0);
      capture = ($urandom_range(5) == 0);
      si = 1'($urandom_range(1)); d = 1'($urandom_range(1));
      #1;
      checks++;
      if (so_p != (sel ? m_q_p : si) || so_n != (sel ? ~m_q_n : ~si)) begin
        failures++;
        $display("FAIL: cycle %0d scan out %b/%b", t, so_p, so_n);
      end
      @(posedge clk);
      if (capture) begin m_q_p = d; m_q_n = d; end
      else if (update) begin m_q_p = m_pre; m_q_n = m_pre; end
      if (shift && sel && row) m_pre = si;
      #1;
      checks++;
      if (q_p != m_q_p || q_n != m_q_n) begin
        failures++;
        $display("FAIL: cycle %0d masters %b/%b expected %b/%b", t, q_p, q_n, m_q_p, m_q_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

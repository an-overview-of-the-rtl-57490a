// fm9001_scan_reg_tb: parallel loads in normal mode, then a full scan
// unload/load in test mode: the W bits loaded in parallel must appear on
// so_o most significant first while a random pattern shifted in from ti
// becomes the new contents.
module fm9001_scan_reg_tb;
  localparam int W = 37;
  logic         clk = 0;
  logic         te_n, ti, so;
  logic [W-1:0] d, q, pat, cap;
  int checks = 0, failures = 0;

  fm9001_scan_reg #(.W(W)) dut (.clk(clk), .te_n(te_n), .ti(ti), .d(d), .q(q), .so_o(so));

  always #5 clk = ~clk;

  initial begin
    te_n = 1; ti = 0;
    for (int r = 0; r < 20; r++) begin
      // Parallel load.
      @(negedge clk); d = W'({$urandom, $urandom}); te_n = 1;
      @(negedge clk);
      checks++;
      if (q !== d) begin failures++; $display("FAIL load %h expected %h", q, d); end
      // Scan: unload the captured value, load a pattern.
      pat = W'({$urandom, $urandom});
      cap = q;
      d   = ~d;  // must be ignored while scanning
      te_n = 0;
      for (int i = 0; i < W; i++) begin
        ti = pat[W-1-i];
        checks++;
        if (so !== cap[W-1-i]) begin failures++; $display("FAIL so bit %0d", i); end
        @(negedge clk);
      end
      te_n = 1;
      checks++;
      if (q !== pat) begin failures++; $display("FAIL scanned-in %h expected %h", q, pat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

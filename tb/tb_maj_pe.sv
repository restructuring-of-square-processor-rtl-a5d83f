// tb_maj_pe: self-checking test of the majority-vote processing element.
// Applies every combination of own pixel and four neighbours, checks the
// new pixel against a count of ones (>= 3 of 5), checks load priority and
// that the pixel holds when neither load nor step is asserted.
module tb_maj_pe;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, pix_in, step, n, s, e, w, pix;
  int   checks = 0, failures = 0;

  maj_pe dut (.clk, .rst_n, .load, .pix_in, .step,
              .nbr_n(n), .nbr_s(s), .nbr_e(e), .nbr_w(w), .pix);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    {load, pix_in, step, n, s, e, w} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 32; v++) begin
      // load own pixel
      @(negedge clk); load = 1'b1; step = 1'b0; pix_in = v[4];
      @(negedge clk); load = 1'b0;
      check(pix, v[4], "load");
      {n, s, e, w} = v[3:0];
      step = 1'b1;
      @(negedge clk); step = 1'b0;
      check(pix, ($countones(v[4:0]) >= 3), $sformatf("vote %05b", v[4:0]));
      // hold
      {n, s, e, w} = ~v[3:0];
      @(negedge clk);
      check(pix, ($countones(v[4:0]) >= 3), "hold");
    end
    // load wins over step
    @(negedge clk); {n, s, e, w} = 4'hf; load = 1'b1; step = 1'b1; pix_in = 1'b0;
    @(negedge clk); load = 1'b0; step = 1'b0;
    check(pix, 1'b0, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

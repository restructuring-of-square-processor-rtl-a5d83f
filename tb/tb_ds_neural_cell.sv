// tb_ds_neural_cell: self-checking test of the two-neuron subnet of one
// processor.  With A = 3 and B = 4 (bias 5) it checks the situations of the
// Direct Substitution dynamics, each with the expected next state:
//   unrepaired defect (influence B/2)          -> neuron fires
//   partner already firing (B/2 - B)           -> stays off
//   competing neuron on the line (B/2 - A)     -> turns off / stays off
//   same, noise +B/2                           -> an off neuron fires
//   disabled (fault-free element, broken spare)-> forced off
module tb_ds_neural_cell;
  import bisr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic defect, v_ok, h_ok, load, init_v, init_h, upd_v, upd_h, s_v, s_h;
  infl_t noise;
  logic [3:0] col_cnt, row_cnt;
  int checks = 0, failures = 0;

  ds_neural_cell #(.A(3), .B(4), .CW(4)) dut (
    .clk, .rst_n, .defect, .v_spare_ok(v_ok), .h_spare_ok(h_ok), .load,
    .init_v, .init_h, .upd_v, .upd_h, .noise, .col_v_cnt(col_cnt),
    .row_h_cnt(row_cnt), .s_v, .s_h);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [1:0] got, logic [1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: {v,h}=%02b expected %02b", what, got, exp);
    end
  endtask

  // preset both neurons, then one update of one neuron with the given
  // line counts (counts exclude this cell; its own state is added here)
  task automatic trial(logic iv, logic ih, logic uv, logic uh, int other_col,
                       int other_row, int nz, logic [1:0] exp, string what);
    @(negedge clk);
    load = 1'b1; init_v = iv; init_h = ih; upd_v = 1'b0; upd_h = 1'b0;
    @(negedge clk);
    load = 1'b0; upd_v = uv; upd_h = uh; noise = infl_t'(nz);
    col_cnt = 4'(other_col + int'(s_v));
    row_cnt = 4'(other_row + int'(s_h));
    @(negedge clk);
    upd_v = 1'b0; upd_h = 1'b0;
    check({s_v, s_h}, exp, what);
  endtask

  initial begin
    {defect, v_ok, h_ok, load, init_v, init_h, upd_v, upd_h} = '0;
    noise = '0; col_cnt = '0; row_cnt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    defect = 1'b1; v_ok = 1'b1; h_ok = 1'b1;
    trial(0, 0, 1, 0, 0, 0, 0, 2'b10, "lone defect, V fires");
    trial(0, 0, 0, 1, 0, 0, 0, 2'b01, "lone defect, H fires");
    trial(0, 0, 1, 0, 0, 0, -2, 2'b00, "lone defect, noise -2 holds");
    trial(1, 0, 0, 1, 0, 0, 2, 2'b10, "partner firing suppresses H");
    trial(0, 1, 1, 0, 0, 0, 2, 2'b01, "partner firing suppresses V");
    trial(1, 0, 1, 0, 1, 0, 0, 2'b00, "V conflict in column turns off");
    trial(0, 1, 0, 1, 0, 1, 0, 2'b00, "H conflict in row turns off");
    trial(0, 0, 1, 0, 1, 0, 0, 2'b00, "V blocked by used spare");
    trial(0, 0, 1, 0, 1, 0, 2, 2'b10, "noise lets V take used spare");
    trial(0, 0, 1, 0, 2, 0, 2, 2'b00, "two users on line block V");
    trial(1, 0, 1, 0, 0, 0, -2, 2'b10, "matched V stable under noise");
    trial(1, 1, 1, 0, 0, 0, 0, 2'b01, "redundant pair: V drops");
    v_ok = 1'b0;
    trial(1, 0, 1, 0, 0, 0, 0, 2'b00, "broken column spare disables V");
    trial(0, 0, 0, 1, 0, 0, 0, 2'b01, "H still works");
    v_ok = 1'b1; defect = 1'b0;
    trial(1, 1, 1, 1, 0, 0, 2, 2'b00, "fault-free element disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

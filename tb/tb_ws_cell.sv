// tb_ws_cell: self-checking test of one Window Substitution element with its
// multiplexers and demultiplexers (2 x 3 window, 8-bit data).  Random moves
// (one-hot or none), random line data and random shift/step commands; a
// reference model of the element checks that inputs are taken only from line
// k of the move, that outputs appear only on line k, and the shift and
// systolic-sum behaviour.
module tb_ws_cell;
  localparam int P = 2, Q = 3, W = 8, PQ = P * Q;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [PQ-1:0] move;
  logic [PQ-1:0][W-1:0] w_lines, n_lines, e_lines, s_lines;
  logic shift, step;
  logic [W-1:0] m_val, m_h, m_v, w_in, n_in;
  int checks = 0, failures = 0;

  ws_cell #(.P(P), .Q(Q), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    move = '0; w_lines = '0; n_lines = '0; shift = 0; step = 0;
    m_val = '0; m_h = '0; m_v = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 40 == 0) begin
        k = $urandom_range(0, PQ);   // PQ = no move
        move = (k == PQ) ? '0 : PQ'(1) << k;
      end
      for (int l = 0; l < PQ; l++) begin
        w_lines[l] = W'($urandom);
        n_lines[l] = W'($urandom);
      end
      shift = ($urandom_range(0, 3) == 0);
      step  = ($urandom_range(0, 1) == 0);
      w_in = '0; n_in = '0;
      for (int l = 0; l < PQ; l++) if (move[l]) begin w_in = w_lines[l]; n_in = n_lines[l]; end
      @(posedge clk);
      if (shift) begin m_val = w_in; m_h = w_in; end
      else if (step) begin m_h = w_in + m_val; m_v = n_in + m_val; end
      #1;
      for (int l = 0; l < PQ; l++) begin
        checks += 2;
        if (e_lines[l] !== (move[l] ? m_h : W'(0))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d e line %0d: %h exp %h", t, l, e_lines[l], move[l] ? m_h : W'(0));
        end
        if (s_lines[l] !== (move[l] ? m_v : W'(0))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d s line %0d: %h exp %h", t, l, s_lines[l], move[l] ? m_v : W'(0));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

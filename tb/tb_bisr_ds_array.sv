// tb_bisr_ds_array: end-to-end test of the Direct Substitution array.
// For several fault patterns (one with a broken spare) it
//   * pulses repair_start and waits for repair_done;
//   * forces the pixel register of every defective regular element to 1
//     (stuck-at), so any path through a defective element corrupts the
//     image;
//   * loads a random logical image, runs several majority-vote steps and
//     compares the logical image after each step with a reference filter
//     computed in the testbench.
// It also runs the same image on a fault-free array with no repair.
module tb_bisr_ds_array;
  import bisr_pkg::*;
  localparam int M = 8, N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M:0][N:0] fault;
  logic repair_start, load, step;
  logic [M:1][N:1] init_v, init_h, sub_v, sub_h, pix_in, pix_out;
  nn_state_e repair_state;
  logic repair_busy, repair_done, repair_fail;
  logic [31:0] repair_cycles;
  int checks = 0, failures = 0;

  bisr_ds_array #(.M(M), .N(N), .TIMEOUT(60000)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [M:1][N:1] img;

  function automatic logic [M:1][N:1] vote(logic [M:1][N:1] x);
    logic [M:1][N:1] y;
    int c;
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) begin
        c = int'(x[i][j]);
        if (i > 1) c += int'(x[i-1][j]);
        if (i < M) c += int'(x[i+1][j]);
        if (j > 1) c += int'(x[i][j-1]);
        if (j < N) c += int'(x[i][j+1]);
        y[i][j] = (c >= 3);
      end
    return y;
  endfunction

  // Defective elements: their pixel register is forced to 1 (stuck-at).
  // One generate branch per element so the force names a fixed variable.
  logic [M:1][N:1] stuck;
  for (genvar i = 1; i <= M; i++) begin : g_f
    for (genvar j = 1; j <= N; j++) begin : g_c
      always @(stuck[i][j]) begin
        if (stuck[i][j]) force dut.g_row[i].g_col[j].u_pe.pix = 1'b1;
        else             release dut.g_row[i].g_col[j].u_pe.pix;
      end
    end
  end

  task automatic run_pattern(string name, int nsteps);
    int cyc;
    for (int i = 1; i <= M; i++) for (int j = 1; j <= N; j++) stuck[i][j] = fault[i][j];
    @(negedge clk); repair_start = 1'b1; @(negedge clk); repair_start = 1'b0;
    cyc = 0;
    while (!repair_done && !repair_fail && cyc < 70000) begin @(negedge clk); cyc++; end
    checks++;
    if (!repair_done) begin
      failures++;
      $display("FAIL %s: no repair", name);
      return;
    end
    img = pix_in;
    @(negedge clk); load = 1'b1; @(negedge clk); load = 1'b0;
    checks++;
    if (pix_out !== img) begin failures++; $display("FAIL %s: load", name); end
    for (int s = 0; s < nsteps; s++) begin
      step = 1'b1; @(negedge clk); step = 1'b0;
      img = vote(img);
      checks++;
      if (pix_out !== img) begin
        failures++;
        $display("FAIL %s step %0d: got %h expected %h", name, s, pix_out, img);
      end
      @(negedge clk);
    end
    $display("%s: repaired in %0d cycles, %0d substitutions", name, repair_cycles,
             $countones(sub_v) + $countones(sub_h));
  endtask

  initial begin
    fault = '0; repair_start = 0; load = 0; step = 0; init_v = '0; init_h = '0;
    stuck = '0;
    pix_in = (M*N)'({$urandom, $urandom});
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_pattern("no defects", 3);

    fault[1][1] = 1; fault[1][3] = 1; fault[2][2] = 1; fault[5][5] = 1;
    fault[5][7] = 1; fault[8][8] = 1; fault[7][8] = 1;
    pix_in = (M*N)'({$urandom, $urandom});
    run_pattern("seven defects", 4);

    fault = '0;
    fault[3][0] = 1;          // broken spare (3,0)
    fault[3][2] = 1; fault[3][6] = 1; fault[4][2] = 1; fault[8][1] = 1;
    pix_in = (M*N)'({$urandom, $urandom});
    run_pattern("broken spare", 4);

    for (int t = 0; t < 5; t++) begin
      fault = '0;
      for (int d = 0; d < 6; d++) fault[$urandom_range(1, M)][$urandom_range(1, N)] = 1;
      // keep it certainly repairable: at most one defect per row
      for (int i = 1; i <= M; i++) begin
        bit seen_one;
        seen_one = 0;
        for (int j = 1; j <= N; j++) begin
          if (fault[i][j] && seen_one) fault[i][j] = 0;
          if (fault[i][j]) seen_one = 1;
        end
      end
      pix_in = (M*N)'({$urandom, $urandom});
      run_pattern($sformatf("random %0d", t), 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

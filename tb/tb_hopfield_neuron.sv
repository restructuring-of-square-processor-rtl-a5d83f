// tb_hopfield_neuron: self-checking test of the binary threshold neuron.
// Drives random influence, update, load and enable values and compares the
// state with a reference model of the rule: fire on positive influence, stop
// on negative, keep on zero; held off when disabled; load presets.
module tb_hopfield_neuron;
  import bisr_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  enable, load, init_val, update, s;
  infl_t influence;
  logic  model;
  int    checks = 0, failures = 0;

  hopfield_neuron dut (.clk, .rst_n, .enable, .load, .init_val, .update,
                       .influence, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {enable, load, init_val, update} = '0;
    influence = '0;
    model = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (s !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      enable    = ($urandom_range(0, 9) != 0);
      load      = ($urandom_range(0, 9) == 0);
      init_val  = 1'($urandom);
      update    = ($urandom_range(0, 2) != 0);
      influence = infl_t'($signed($urandom_range(0, 8)) - 4);
      @(posedge clk);
      if (!enable)       model = 1'b0;
      else if (load)     model = init_val;
      else if (update) begin
        if (influence > 0)      model = 1'b1;
        else if (influence < 0) model = 1'b0;
      end
      #1;
      checks++;
      if (s !== model) begin
        failures++;
        $display("FAIL t=%0d en=%0b ld=%0b upd=%0b infl=%0d: s=%0b exp=%0b",
                 t, enable, load, update, influence, s, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

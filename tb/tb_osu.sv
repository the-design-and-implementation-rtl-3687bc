// tb_osu: self-checking testbench of the Operand-Selection Unit.
// Drives random operands and selects; checks that the output is the new value
// when selected and otherwise the value of the last selected cycle.
module tb_osu;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, sel;
  logic [W-1:0] new_val, out, model;
  int checks = 0, failures = 0;

  osu #(.W(W)) dut (.clk, .rst_n, .sel, .new_val, .out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 0; new_val = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sel = ($urandom_range(0, 2) == 0);
      new_val = W'($urandom);
      #1;
      checks++;
      if (out !== (sel ? new_val : model)) begin
        failures++;
        $display("cycle %0d: sel=%0b new=%h out=%h expected %h", i, sel, new_val, out,
                 sel ? new_val : model);
      end
      @(posedge clk);
      if (sel) model = new_val;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

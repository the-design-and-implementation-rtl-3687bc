// tb_arm_multiplier: checks MUL/MLA results against 64-bit products.
module tb_arm_multiplier;
  import lp_pkg::*;
  word_t a, b, c, res;
  logic  acc;
  int checks = 0, failures = 0;
  longint unsigned p;

  arm_multiplier dut (.a, .b, .c, .acc, .res);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; c = $urandom; acc = $urandom_range(0, 1);
      if (i == 0) begin a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; c = 32'd5; acc = 1; end
      if (i == 1) begin a = 32'd0; b = 32'h1234_5678; c = 32'd7; acc = 0; end
      #1;
      p = longint'(a) * longint'(b) + (acc ? longint'(c) : 0);
      checks++;
      if (res !== p[31:0]) begin
        failures++;
        $display("a=%h b=%h c=%h acc=%0b res=%h expected %h", a, b, c, acc, res, p[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

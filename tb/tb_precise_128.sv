// Testbench of the 128 x 128 multiplier: random operands, single-bit
// operands and all-ones operands; the 256-bit product is compared with the
// simulator's own multiplication.
module tb_precise_128;
  logic [127:0] a, b;
  logic [255:0] y;
  int checks = 0, failures = 0;

  precise_128 dut (.a(a), .b(b), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      case (i % 6)
        0: begin a = '1; b = '1; end
        1: b = 128'(1) << (i % 128);
        2: a = a >> $urandom_range(0, 127);
        default: ;
      endcase
      #1;
      checks++;
      if (y != 256'(a) * 256'(b)) begin
        failures++;
        if (failures < 10) $display("MISMATCH %h * %h = %h", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

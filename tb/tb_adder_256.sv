// Testbench of the parallel prefix adder, in both its dense Kogge-Stone form
// and its sparse form with 4-bit ripple blocks. The 256-bit adders get random
// operands plus long carry chains (all ones plus carry-in, alternating
// patterns); 8-bit instances of both forms are checked exhaustively over all
// operand pairs and both carry-in values. Expected values come from the
// simulator's own integer addition.
module tb_adder_256;
  logic [255:0] a, b;
  logic cin;
  logic [256:0] y;
  logic [7:0] a8, b8;
  logic cin8;
  logic [8:0] y8, y8s;
  logic [256:0] ys;
  int checks = 0, failures = 0;

  adder_256 dut (.a(a), .b(b), .cin(cin), .y(y));
  adder_256 #(.N(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .y(y8));
  adder_256 #(.SPARSE(1'b1)) dut_s (.a(a), .b(b), .cin(cin), .y(ys));
  adder_256 #(.N(8), .SPARSE(1'b1)) dut8s (.a(a8), .b(b8), .cin(cin8), .y(y8s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = rnd256();
      b = rnd256();
      cin = 1'($urandom);
      case (i % 8)
        0: begin a = '1; b = 256'(i / 8); end
        1: b = ~a;
        2: begin a = {128{2'b10}}; b = {128{2'b01}}; end
        default: ;
      endcase
      #1;
      checks++;
      if (y != {1'b0, a} + {1'b0, b} + 257'(cin) || ys != y) begin
        failures++;
        if (failures < 10) $display("MISMATCH a=%h b=%h cin=%b y=%h sparse %h", a, b, cin, y, ys);
      end
    end
    for (int i = 0; i < 512 * 256; i++) begin
      {cin8, a8, b8} = 17'(i);
      #1;
      checks++;
      if (y8 != {1'b0, a8} + {1'b0, b8} + 9'(cin8) || y8s != y8) begin
        failures++;
        if (failures < 10) $display("MISMATCH8 %h %h %b %h", a8, b8, cin8, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

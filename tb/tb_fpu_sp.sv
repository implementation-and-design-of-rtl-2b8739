// Self-checking testbench of the pipelined single precision unit.
// Issues one operation per cycle (random op, rounding mode and operands, with
// many zeros, infinities, NaNs, subnormals and extreme exponents), keeps the
// expected results from the exact reference model in a queue and compares
// each result, its flags and its arrival three edges after issue.
module tb_fpu_sp;
  import fp_ref_pkg::*;

  localparam int NOPS = 40000;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        start = 0;
  logic [1:0]  op = 0, rmode = 0;
  logic [31:0] opa = 0, opb = 0;
  logic        ready, zero, snan, qnan, inf, ine;
  logic [31:0] result;

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { ref_t r; int issue; logic [31:0] a, b; int op, rm; } exp_t;
  exp_t q[$];

  fpu_sp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker
  always @(negedge clk) begin
    if (rst_n && ready) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected result %h", result);
      end else begin
        e = q.pop_front();
        if (result !== e.r.res || snan !== e.r.snan || qnan !== e.r.qnan ||
            inf !== e.r.inf || ine !== e.r.ine || zero !== e.r.zero ||
            cycle - e.issue != 2) begin  // issue edge is edge 1, result at edge 3
          failures++;
          if (failures < 20)
            $display("MISMATCH op=%0d rm=%0d a=%h b=%h: got %h s%b q%b i%b x%b z%b edges=%0d, exp %h s%b q%b i%b x%b z%b",
                     e.op, e.rm, e.a, e.b, result, snan, qnan, inf, ine, zero, cycle - e.issue + 1,
                     e.r.res, e.r.snan, e.r.qnan, e.r.inf, e.r.ine, e.r.zero);
        end
      end
    end
  end

  initial begin
    exp_t e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NOPS; i++) begin
      start = ($urandom_range(0, 7) != 0);
      op    = 2'($urandom_range(0, 3));
      rmode = 2'($urandom);
      opa   = rand_operand();
      opb   = rand_operand();
      if (i % 5 == 0) opb[30:23] = opa[30:23] + 8'($urandom_range(0, 2)) - 8'd1; // cancellation
      if (start) begin
        e.r = fp_op(int'(op), int'(rmode), opa, opb);
        e.issue = cycle + 1;   // sampled at the coming edge
        e.a = opa; e.b = opb; e.op = int'(op); e.rm = int'(rmode);
        q.push_back(e);
      end
      @(negedge clk);
    end
    start = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

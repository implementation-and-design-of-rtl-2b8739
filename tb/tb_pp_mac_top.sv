// End-to-end testbench of the top level at its default sizes.
// MAC half: several dot products sum(A_i * B_i) of 128-bit vectors are run
// through the accumulator, each started with a clear; some steps are held
// with the enable low and some use all-ones operands so the 256-bit sum
// wraps and sets the carry bit. The accumulator is compared with a model
// after every edge and each final dot product with a directly computed sum.
// FPU half: one operation issued per cycle in parallel with the MAC traffic,
// checked against the exact reference model with its three-edge latency.
// Every mechanism (accumulate, hold, clear, wrap; add, subtract, multiply,
// all four rounding modes, subnormal and zero results, overflow, NaN, sNaN,
// infinity, inexact, back-to-back issue) is counted, and one that never
// occurred counts as a failure.
module tb_pp_mac_top;
  import fp_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic [127:0] mac_a = 0, mac_b = 0;
  logic         mac_en = 0, mac_clr = 0;
  logic [256:0] mac_y;
  logic         fpu_start = 0;
  logic [1:0]   fpu_op = 0, fpu_rmode = 0;
  logic [31:0]  fpu_opa = 0, fpu_opb = 0;
  logic         fpu_ready, fpu_zero, fpu_snan, fpu_qnan, fpu_inf, fpu_ine;
  logic [31:0]  fpu_result;

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef enum int {
    M_ACC, M_HOLD, M_CLR, M_WRAP, M_DOT,
    F_ADD, F_SUB, F_MUL, F_RNE, F_RZ, F_RUP, F_RDN,
    F_SUBNORM, F_ZERO, F_OVF, F_NAN, F_SNAN, F_INF, F_INE, F_B2B, M_COUNT
  } mech_e;
  int cnt [M_COUNT];

  typedef struct { ref_t r; int issue; int op, rm; } exp_t;
  exp_t q[$];

  pp_mac_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- FPU traffic and checker ----------------
  always @(negedge clk) begin
    if (rst_n && fpu_ready) begin
      exp_t e;
      checks++;
      if (q.size() == 0) failures++;
      else begin
        e = q.pop_front();
        if (fpu_result !== e.r.res || fpu_snan !== e.r.snan || fpu_qnan !== e.r.qnan ||
            fpu_inf !== e.r.inf || fpu_ine !== e.r.ine || fpu_zero !== e.r.zero ||
            cycle - e.issue != 2) begin
          failures++;
          if (failures < 20) $display("FPU MISMATCH op=%0d rm=%0d got %h expected %h",
                                      e.op, e.rm, fpu_result, e.r.res);
        end
        if (e.op == 0) cnt[F_ADD]++;
        if (e.op == 1) cnt[F_SUB]++;
        if (e.op >= 2) cnt[F_MUL]++;
        cnt[F_RNE + e.rm]++;
        if (fpu_result[30:23] == 0 && fpu_result[22:0] != 0) cnt[F_SUBNORM]++;
        if (fpu_zero) cnt[F_ZERO]++;
        if (e.r.ovf) cnt[F_OVF]++;
        if (fpu_qnan) cnt[F_NAN]++;
        if (fpu_snan) cnt[F_SNAN]++;
        if (fpu_inf) cnt[F_INF]++;
        if (fpu_ine) cnt[F_INE]++;
      end
    end
  end

  bit fpu_run = 0;
  initial begin
    exp_t e;
    bit prev = 0;
    wait (fpu_run);
    while (fpu_run) begin
      @(negedge clk);
      fpu_start = ($urandom_range(0, 3) != 0);
      fpu_op    = 2'($urandom);
      fpu_rmode = 2'($urandom);
      fpu_opa   = rand_operand();
      fpu_opb   = rand_operand();
      if (fpu_start) begin
        e.r = fp_op(int'(fpu_op), int'(fpu_rmode), fpu_opa, fpu_opb);
        e.issue = cycle + 1;
        e.op = int'(fpu_op);
        e.rm = int'(fpu_rmode);
        q.push_back(e);
        if (prev) cnt[F_B2B]++;
      end
      prev = fpu_start;
    end
    @(negedge clk);
    fpu_start = 0;
  end

  // ---------------- MAC dot products ----------------
  initial begin
    logic [256:0] model, dot;
    logic [255:0] prod;
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fpu_run = 1;
    model = '0;
    for (int v = 0; v < 40; v++) begin
      // clear before each dot product
      @(negedge clk);
      mac_clr = 1;
      mac_en  = 0;
      model   = '0;
      cnt[M_CLR]++;
      @(posedge clk);
      #1;
      checks++;
      if (mac_y != '0) failures++;
      @(negedge clk);
      mac_clr = 0;
      dot = '0;
      len = $urandom_range(2, 24);
      for (int i = 0; i < len; i++) begin
        mac_a = {$urandom, $urandom, $urandom, $urandom};
        mac_b = {$urandom, $urandom, $urandom, $urandom};
        if (v % 3 == 0) begin mac_a = '1; mac_b = '1; end
        else if (v % 3 == 1) begin mac_a = mac_a >> 64; mac_b = mac_b >> 64; end
        mac_en = ($urandom_range(0, 5) != 0);
        prod = 256'(mac_a) * 256'(mac_b);
        if (mac_en) begin
          model = {1'b0, model[255:0]} + {1'b0, prod};
          dot = {1'b0, dot[255:0] + prod};
          cnt[M_ACC]++;
          if (model[256]) cnt[M_WRAP]++;
        end else begin
          cnt[M_HOLD]++;
        end
        @(posedge clk);
        #1;
        checks++;
        if (mac_y != model) begin
          failures++;
          if (failures < 20) $display("MAC MISMATCH v=%0d i=%0d: %h vs %h", v, i, mac_y, model);
        end
        @(negedge clk);
      end
      mac_en = 0;
      // the dot product modulo 2^256 must sit in the low bits
      checks++;
      cnt[M_DOT]++;
      if (mac_y[255:0] != dot[255:0]) failures++;
    end
    fpu_run = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("%-10s %0d", me.name(), cnt[m]);
      checks++;
      if (cnt[m] == 0) begin
        failures++;
        $display("mechanism %s never exercised", me.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

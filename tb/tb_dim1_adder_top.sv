// tb_dim1_adder_top -- end-to-end testbench of dim1_adder_top at its default
// parameters (N = 8, modulo 257; K = 2).
//
// Applies all 65536 operand pairs, one per clock cycle, to the three adders
// at once and checks each sum and real-zero flag against the residue
// (A + B) mod 257 computed from the represented values, and the three
// adders against each other.  It counts how often each mechanism of the
// modulo addition occurred and fails if one never did:
//   wrapped     A* + B* >= 2^n, the carry out is dropped
//   incremented A* + B* <  2^n, the inverted end-around carry adds 1
//   long_carry  that end-around carry ripples up to the top bit
//   real_zero   complementary operands, result 0
//   value_one   all-zero output meaning the value 1
module tb_dim1_adder_top;
  import dim1_ref_pkg::*;

  localparam int N        = 8;
  localparam int WATCHDOG = 70000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b, s_ppref, s_cla1, s_cla2;
  logic         zero_ppref, zero_cla1, zero_cla2;

  dim1_adder_top dut (
    .a_dim      (a),
    .b_dim      (b),
    .s_ppref    (s_ppref),
    .s_cla1     (s_cla1),
    .s_cla2     (s_cla2),
    .zero_ppref (zero_ppref),
    .zero_cla1  (zero_cla1),
    .zero_cla2  (zero_cla2)
  );

  int checks   = 0;
  int failures = 0;
  int n_wrap   = 0;
  int n_incr   = 0;
  int n_long   = 0;
  int n_zero   = 0;
  int n_one    = 0;

  task automatic expect_eq(string what, u64_t got, u64_t exp, u64_t av, u64_t bv);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h: got %h expected %h", what, av, bv, got, exp);
    end
  endtask

  initial begin
    u64_t sr;
    u64_t iv;
    u64_t jv;
    bit   zr;
    a = '0;
    b = '0;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        @(negedge clk);
        a = N'(i);
        b = N'(j);
        #1;
        iv = u64_t'(i);
        jv = u64_t'(j);
        dim1_add_ref(N, iv, jv, sr, zr);
        expect_eq("s_ppref", u64_t'(s_ppref), sr, iv, jv);
        expect_eq("s_cla1",  u64_t'(s_cla1),  sr, iv, jv);
        expect_eq("s_cla2",  u64_t'(s_cla2),  sr, iv, jv);
        expect_eq("zero_ppref", u64_t'(zero_ppref), u64_t'(zr), iv, jv);
        expect_eq("zero_cla1",  u64_t'(zero_cla1),  u64_t'(zr), iv, jv);
        expect_eq("zero_cla2",  u64_t'(zero_cla2),  u64_t'(zr), iv, jv);
        if (carry_out(N, iv, jv)) n_wrap++;
        else begin
          n_incr++;
          // a carry into the top bit that only the end-around 1 produces
          if (carry_into(N, iv, jv, N - 1) &&
              (((iv & mask(N - 1)) + (jv & mask(N - 1))) >> (N - 1)) == 0)
            n_long++;
        end
        if (zr) n_zero++;
        if (!zr && sr == 0) n_one++;
      end
    end
    @(negedge clk);
    if (n_wrap == 0) begin failures++; $display("FAIL: no wrapped sum"); end
    if (n_incr == 0) begin failures++; $display("FAIL: no incremented sum"); end
    if (n_long == 0) begin failures++; $display("FAIL: end-around carry never reached the top bit"); end
    if (n_zero == 0) begin failures++; $display("FAIL: no real zero"); end
    if (n_one  == 0) begin failures++; $display("FAIL: no result of value 1"); end
    $display("mechanisms: wrapped=%0d incremented=%0d long_carry=%0d real_zero=%0d value_one=%0d",
             n_wrap, n_incr, n_long, n_zero, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_dim1_ppref_adder -- self-checking testbench for dim1_ppref_adder.
//
// Runs the parallel-prefix adder at the widths 4, 8, 16 and 32.
// Every result is compared with a reference computed from the represented
// values (A = A* + 1, B = B* + 1, S = (A + B) mod 2^n+1).  Widths up to 8
// bits are tested exhaustively, wider ones with random operands mixed with
// the corner cases of the modulo addition.  A new operand pair is applied
// at each falling clock edge and the outputs are checked one time unit
// later.  The test counts how often each path of the adder was taken
// (sum wrapped past 2^n, sum incremented, real zero, the value 1) and counts
// a failure for a path never exercised.
module tb_dim1_ppref_adder;
  import dim1_ref_pkg::*;

  localparam int NRAND    = 20000;
  localparam int WATCHDOG = 400000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_wrap   = 0;
  int n_incr   = 0;
  int n_zero   = 0;
  int n_one    = 0;
  bit done [4];

  // ---- width 4
  begin : g_n4
    localparam int N = 4;
    logic [N-1:0] a, b, s;
    logic         z;

    dim1_ppref_adder #(.N(4)) dut (.a_dim(a), .b_dim(b), .s_dim(s), .zero(z));

    task automatic check_one(input u64_t av, input u64_t bv);
      u64_t sr;
      bit   zr;
      @(negedge clk);
      a = N'(av);
      b = N'(bv);
      #1;
      dim1_add_ref(N, av, bv, sr, zr);
      checks++;
      if (u64_t'(s) != sr || z != zr) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h: s=%h zero=%b, expected s=%h zero=%b",
                   N, av, bv, s, z, sr, zr);
      end
      if (carry_out(N, av, bv)) n_wrap++; else n_incr++;
      if (zr) n_zero++;
      if (!zr && sr == 0) n_one++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[0] = 1'b0;
      a = '0;
      b = '0;
      if (N <= 8) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(u64_t'(i), u64_t'(j));
      end else begin
        for (int i = 0; i < NRAND; i++) begin
          pick_operands(N, av, bv);
          check_one(av, bv);
        end
      end
      done[0] = 1'b1;
    end
  end

  // ---- width 8
  begin : g_n8
    localparam int N = 8;
    logic [N-1:0] a, b, s;
    logic         z;

    dim1_ppref_adder #(.N(8)) dut (.a_dim(a), .b_dim(b), .s_dim(s), .zero(z));

    task automatic check_one(input u64_t av, input u64_t bv);
      u64_t sr;
      bit   zr;
      @(negedge clk);
      a = N'(av);
      b = N'(bv);
      #1;
      dim1_add_ref(N, av, bv, sr, zr);
      checks++;
      if (u64_t'(s) != sr || z != zr) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h: s=%h zero=%b, expected s=%h zero=%b",
                   N, av, bv, s, z, sr, zr);
      end
      if (carry_out(N, av, bv)) n_wrap++; else n_incr++;
      if (zr) n_zero++;
      if (!zr && sr == 0) n_one++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[1] = 1'b0;
      a = '0;
      b = '0;
      if (N <= 8) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(u64_t'(i), u64_t'(j));
      end else begin
        for (int i = 0; i < NRAND; i++) begin
          pick_operands(N, av, bv);
          check_one(av, bv);
        end
      end
      done[1] = 1'b1;
    end
  end

  // ---- width 16
  begin : g_n16
    localparam int N = 16;
    logic [N-1:0] a, b, s;
    logic         z;

    dim1_ppref_adder #(.N(16)) dut (.a_dim(a), .b_dim(b), .s_dim(s), .zero(z));

    task automatic check_one(input u64_t av, input u64_t bv);
      u64_t sr;
      bit   zr;
      @(negedge clk);
      a = N'(av);
      b = N'(bv);
      #1;
      dim1_add_ref(N, av, bv, sr, zr);
      checks++;
      if (u64_t'(s) != sr || z != zr) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h: s=%h zero=%b, expected s=%h zero=%b",
                   N, av, bv, s, z, sr, zr);
      end
      if (carry_out(N, av, bv)) n_wrap++; else n_incr++;
      if (zr) n_zero++;
      if (!zr && sr == 0) n_one++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[2] = 1'b0;
      a = '0;
      b = '0;
      if (N <= 8) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(u64_t'(i), u64_t'(j));
      end else begin
        for (int i = 0; i < NRAND; i++) begin
          pick_operands(N, av, bv);
          check_one(av, bv);
        end
      end
      done[2] = 1'b1;
    end
  end

  // ---- width 32
  begin : g_n32
    localparam int N = 32;
    logic [N-1:0] a, b, s;
    logic         z;

    dim1_ppref_adder #(.N(32)) dut (.a_dim(a), .b_dim(b), .s_dim(s), .zero(z));

    task automatic check_one(input u64_t av, input u64_t bv);
      u64_t sr;
      bit   zr;
      @(negedge clk);
      a = N'(av);
      b = N'(bv);
      #1;
      dim1_add_ref(N, av, bv, sr, zr);
      checks++;
      if (u64_t'(s) != sr || z != zr) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h: s=%h zero=%b, expected s=%h zero=%b",
                   N, av, bv, s, z, sr, zr);
      end
      if (carry_out(N, av, bv)) n_wrap++; else n_incr++;
      if (zr) n_zero++;
      if (!zr && sr == 0) n_one++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[3] = 1'b0;
      a = '0;
      b = '0;
      if (N <= 8) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(u64_t'(i), u64_t'(j));
      end else begin
        for (int i = 0; i < NRAND; i++) begin
          pick_operands(N, av, bv);
          check_one(av, bv);
        end
      end
      done[3] = 1'b1;
    end
  end

  initial begin
    wait (done.and());
    @(negedge clk);
    if (n_wrap == 0) begin failures++; $display("FAIL: no sum wrapped past 2^n"); end
    if (n_incr == 0) begin failures++; $display("FAIL: no sum was incremented"); end
    if (n_zero == 0) begin failures++; $display("FAIL: no real zero result"); end
    if (n_one  == 0) begin failures++; $display("FAIL: no result of value 1"); end
    $display("paths: wrapped=%0d incremented=%0d real_zero=%0d value_one=%0d",
             n_wrap, n_incr, n_zero, n_one);
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

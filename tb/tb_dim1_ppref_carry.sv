// tb_dim1_ppref_carry -- self-checking testbench for dim1_ppref_carry, the
// parallel-prefix carry network.
//
// The bit-level (g, p) pairs are formed here from operand pairs, and every
// carry cin[i] is compared with the carry into bit i of A* + B* + c_in,
// c_in being the inverted carry out of A* + B*, computed with integer
// arithmetic.  Widths: 4 8 16 32; up to 8 bits exhaustively, wider
// ones with random and corner-case operands.  One operand pair per clock
// cycle.  The test also counts how often the end-around carry was 1 and 0.
module tb_dim1_ppref_carry;
  import dim1_pkg::*;
  import dim1_ref_pkg::*;

  localparam int NRAND    = 20000;
  localparam int WATCHDOG = 400000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_cm1    = 0;
  int n_nocm1  = 0;
  bit done [4];

  begin : g_n4
    localparam int N = 4;
    gp_t  [N-1:0] gp;
    logic [N-1:0] cin;

    dim1_ppref_carry #(.N(N)) dut (.gp(gp), .cin(cin));

    task automatic check_one(input u64_t av, input u64_t bv);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        gp[i].g = av[i] & bv[i];
        gp[i].p = av[i] | bv[i];
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (cin[i] != carry_into(N, av, bv, i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d a=%h b=%h: carry into bit %0d is %b", N, av, bv, i, cin[i]);
        end
      end
      if (cin[0]) n_cm1++; else n_nocm1++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[0] = 1'b0;
      gp = '0;
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

  begin : g_n8
    localparam int N = 8;
    gp_t  [N-1:0] gp;
    logic [N-1:0] cin;

    dim1_ppref_carry #(.N(N)) dut (.gp(gp), .cin(cin));

    task automatic check_one(input u64_t av, input u64_t bv);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        gp[i].g = av[i] & bv[i];
        gp[i].p = av[i] | bv[i];
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (cin[i] != carry_into(N, av, bv, i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d a=%h b=%h: carry into bit %0d is %b", N, av, bv, i, cin[i]);
        end
      end
      if (cin[0]) n_cm1++; else n_nocm1++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[1] = 1'b0;
      gp = '0;
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

  begin : g_n16
    localparam int N = 16;
    gp_t  [N-1:0] gp;
    logic [N-1:0] cin;

    dim1_ppref_carry #(.N(N)) dut (.gp(gp), .cin(cin));

    task automatic check_one(input u64_t av, input u64_t bv);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        gp[i].g = av[i] & bv[i];
        gp[i].p = av[i] | bv[i];
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (cin[i] != carry_into(N, av, bv, i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d a=%h b=%h: carry into bit %0d is %b", N, av, bv, i, cin[i]);
        end
      end
      if (cin[0]) n_cm1++; else n_nocm1++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[2] = 1'b0;
      gp = '0;
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

  begin : g_n32
    localparam int N = 32;
    gp_t  [N-1:0] gp;
    logic [N-1:0] cin;

    dim1_ppref_carry #(.N(N)) dut (.gp(gp), .cin(cin));

    task automatic check_one(input u64_t av, input u64_t bv);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        gp[i].g = av[i] & bv[i];
        gp[i].p = av[i] | bv[i];
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (cin[i] != carry_into(N, av, bv, i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d a=%h b=%h: carry into bit %0d is %b", N, av, bv, i, cin[i]);
        end
      end
      if (cin[0]) n_cm1++; else n_nocm1++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[3] = 1'b0;
      gp = '0;
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
    if (n_cm1 == 0 || n_nocm1 == 0) begin
      failures++;
      $display("FAIL: end-around carry not seen at both values");
    end
    $display("end-around carry: one=%0d zero=%0d", n_cm1, n_nocm1);
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

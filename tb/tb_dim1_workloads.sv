// tb_dim1_workloads -- the adder configurations of the evaluation, end to end.
//
// Instantiates dim1_adder_top at the four operand widths the design was
// evaluated at, each with the two-level CLA grouping that was fastest there:
//   n = 4  (modulo 17),            K = 2
//   n = 8  (modulo 257),           K = 2  (four groups)
//   n = 16 (modulo 65537),         K = 4  (four groups)
//   n = 32 (modulo 2^32 + 1),      K = 4  (eight groups)
// (At n = 4 the one-level CLA is the evaluated form; the two-level adder is
// carried along with K = 2.)  Widths 4 and 8 are tested exhaustively, 16 and
// 32 with 50000 random and corner-case operand pairs.  All three adders are
// checked against the residue computed from the represented values.  One
// operand pair per clock cycle; counts of wrapped, incremented, real-zero
// and value-one results must all be non-zero.
module tb_dim1_workloads;
  import dim1_ref_pkg::*;

  localparam int NCFG     = 4;
  localparam int CFG_N [NCFG] = '{4, 8, 16, 32};
  localparam int CFG_K [NCFG] = '{2, 2, 4, 4};
  localparam int NRAND    = 50000;
  localparam int WATCHDOG = 100000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_wrap [NCFG];
  int n_incr [NCFG];
  int n_zero [NCFG];
  int n_one  [NCFG];
  bit done   [NCFG];

  for (genvar w = 0; w < NCFG; w++) begin : g_cfg
    localparam int N = CFG_N[w];
    localparam int K = CFG_K[w];
    logic [N-1:0] a, b, s_ppref, s_cla1, s_cla2;
    logic         zero_ppref, zero_cla1, zero_cla2;

    dim1_adder_top #(.N(N), .K(K)) dut (
      .a_dim      (a),
      .b_dim      (b),
      .s_ppref    (s_ppref),
      .s_cla1     (s_cla1),
      .s_cla2     (s_cla2),
      .zero_ppref (zero_ppref),
      .zero_cla1  (zero_cla1),
      .zero_cla2  (zero_cla2)
    );

    task automatic check_one(input u64_t av, input u64_t bv);
      u64_t sr;
      bit   zr;
      @(negedge clk);
      a = N'(av);
      b = N'(bv);
      #1;
      dim1_add_ref(N, av, bv, sr, zr);
      checks += 3;
      if (u64_t'(s_ppref) != sr || zero_ppref != zr) begin
        failures++;
        if (failures < 10) $display("FAIL ppref N=%0d a=%h b=%h", N, av, bv);
      end
      if (u64_t'(s_cla1) != sr || zero_cla1 != zr) begin
        failures++;
        if (failures < 10) $display("FAIL cla1 N=%0d a=%h b=%h", N, av, bv);
      end
      if (u64_t'(s_cla2) != sr || zero_cla2 != zr) begin
        failures++;
        if (failures < 10) $display("FAIL cla2 N=%0d a=%h b=%h", N, av, bv);
      end
      if (carry_out(N, av, bv)) n_wrap[w]++; else n_incr[w]++;
      if (zr) n_zero[w]++;
      if (!zr && sr == 0) n_one[w]++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[w]   = 1'b0;
      n_wrap[w] = 0;
      n_incr[w] = 0;
      n_zero[w] = 0;
      n_one[w]  = 0;
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
      done[w] = 1'b1;
    end
  end

  initial begin
    wait (done.and());
    @(negedge clk);
    for (int w = 0; w < NCFG; w++) begin
      $display("n=%0d: wrapped=%0d incremented=%0d real_zero=%0d value_one=%0d",
               CFG_N[w], n_wrap[w], n_incr[w], n_zero[w], n_one[w]);
      if (n_wrap[w] == 0 || n_incr[w] == 0 || n_zero[w] == 0 || n_one[w] == 0) begin
        failures++;
        $display("FAIL: n=%0d left a path of the addition unexercised", CFG_N[w]);
      end
    end
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

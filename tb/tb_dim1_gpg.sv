// tb_dim1_gpg -- self-checking testbench for dim1_gpg.
//
// Forms bit-level (g, p) pairs from operand pairs and checks every group's
// outputs with integer arithmetic on the group's slice of the operands:
// gg is the carry out of the slice sum with no carry in, gp says that a
// carry into the slice would pass (every bit has a or b set), gq = gg | gp.
// Configurations N/K: 8/2 and 8/4 exhaustively, 10/4 (short last group),
// 16/4 and 32/4 with random operands.  One operand pair per clock cycle.
module tb_dim1_gpg;
  import dim1_pkg::*;
  import dim1_ref_pkg::*;

  localparam int NCFG     = 5;
  localparam int CFG_N [NCFG] = '{8, 8, 10, 16, 32};
  localparam int CFG_K [NCFG] = '{2, 4, 4, 4, 4};
  localparam int WATCHDOG = 200000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_gg_nogp = 0;
  bit done [NCFG];

  for (genvar w = 0; w < NCFG; w++) begin : g_cfg
    localparam int N  = CFG_N[w];
    localparam int K  = CFG_K[w];
    localparam int NG = (N + K - 1) / K;
    gp_t  [N-1:0]  gp;
    logic [NG-1:0] gg, gpr, gq;

    dim1_gpg #(.N(N), .K(K)) dut (.gp(gp), .gg(gg), .gpr(gpr), .gq(gq));

    task automatic check_one(input u64_t av, input u64_t bv);
      int   lo;
      int   len;
      u64_t sa;
      u64_t sb;
      bit   egg;
      bit   egp;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        gp[i].g = av[i] & bv[i];
        gp[i].p = av[i] | bv[i];
      end
      #1;
      for (int j = 0; j < NG; j++) begin
        lo  = K * j;
        len = (lo + K <= N) ? K : N - lo;
        sa  = (av >> lo) & mask(len);
        sb  = (bv >> lo) & mask(len);
        egg = ((sa + sb) >> len) != 0;
        egp = (sa | sb) == mask(len);
        checks++;
        if (gg[j] != egg || gpr[j] != egp || gq[j] != (egg | egp)) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d K=%0d group %0d a=%h b=%h: gg=%b gp=%b gq=%b", N, K, j, av, bv,
                     gg[j], gpr[j], gq[j]);
        end
        if (egg && !egp) n_gg_nogp++;
      end
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[w] = 1'b0;
      gp = '0;
      if (N <= 8) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(u64_t'(i), u64_t'(j));
      end else begin
        for (int i = 0; i < 10000; i++) begin
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
    // gg without gp is the case the extra OR gate (gq) exists for
    if (n_gg_nogp == 0) begin failures++; $display("FAIL: gg=1, gp=0 never seen"); end
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

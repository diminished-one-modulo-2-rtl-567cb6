// tb_dim1_gcla -- self-checking testbench for dim1_gcla.
//
// Forms bit-level (g, p) pairs from operand pairs, drives random carries into
// the groups, and checks the carry into every bit: at a group's lowest bit
// it is the group's carry in, above it the carry out of the integer sum of
// the group's lower slice plus that carry in.  Configurations N/K: 8/2 and
// 8/4 exhaustively in the operands, 10/4 (short last group), 16/4 and 32/4
// with random operands.  One vector per clock cycle.
module tb_dim1_gcla;
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
  bit done [NCFG];

  for (genvar w = 0; w < NCFG; w++) begin : g_cfg
    localparam int N  = CFG_N[w];
    localparam int K  = CFG_K[w];
    localparam int NG = (N + K - 1) / K;
    gp_t  [N-1:0]  gp;
    logic [NG-1:0] gcin;
    logic [N-1:0]  cin;

    dim1_gcla #(.N(N), .K(K)) dut (.gp(gp), .gcin(gcin), .cin(cin));

    task automatic check_one(input u64_t av, input u64_t bv, input logic [NG-1:0] vc);
      int   lo;
      int   len;
      bit   e;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        gp[i].g = av[i] & bv[i];
        gp[i].p = av[i] | bv[i];
      end
      gcin = vc;
      #1;
      for (int i = 0; i < N; i++) begin
        lo  = (i / K) * K;
        len = i - lo;
        e = (len == 0) ? vc[i / K]
                       : ((((av >> lo) & mask(len)) + ((bv >> lo) & mask(len)) + u64_t'(vc[i / K]))
                          >> len) != 0;
        checks++;
        if (cin[i] != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d K=%0d bit %0d a=%h b=%h gcin=%b", N, K, i, av, bv, vc);
        end
      end
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[w] = 1'b0;
      gp = '0;
      gcin = '0;
      if (N <= 8) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(u64_t'(i), u64_t'(j), NG'($urandom));
      end else begin
        for (int i = 0; i < 10000; i++) begin
          pick_operands(N, av, bv);
          check_one(av, bv, NG'($urandom));
        end
      end
      done[w] = 1'b1;
    end
  end

  initial begin
    wait (done.and());
    @(negedge clk);
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

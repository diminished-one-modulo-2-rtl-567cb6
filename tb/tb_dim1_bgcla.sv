// tb_dim1_bgcla -- self-checking testbench for dim1_bgcla.
//
// Applies every combination of group generate and group propagate for 2, 3,
// 4 and 5 groups, and random ones for 8 groups, with gq = gg | gp as the GPG
// unit makes it.  The reference is the definition of the group carries:
// the carry out of the top group is first rippled with no carry in, its
// complement enters group 0, and the group carries are rippled again from
// there.  One input vector per clock cycle.
module tb_dim1_bgcla;

  localparam int NCFG     = 5;
  localparam int CFG [NCFG] = '{2, 3, 4, 5, 8};
  localparam int WATCHDOG = 200000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_cm1    = 0;
  bit done [NCFG];

  for (genvar w = 0; w < NCFG; w++) begin : g_cfg
    localparam int NG = CFG[w];
    logic [NG-1:0] gg, gpr, gq, gcin;

    dim1_bgcla #(.NG(NG)) dut (.gg(gg), .gpr(gpr), .gq(gq), .gcin(gcin));

    task automatic check_one(input logic [NG-1:0] vg, input logic [NG-1:0] vp);
      logic c;
      logic [NG-1:0] exp_c;
      @(negedge clk);
      gg  = vg;
      gpr = vp;
      gq  = vg | vp;
      #1;
      c = 1'b0;
      for (int j = 0; j < NG; j++) c = vg[j] | (vp[j] & c);
      c = ~c;
      for (int j = 0; j < NG; j++) begin
        exp_c[j] = c;
        c = vg[j] | (vp[j] & c);
      end
      checks++;
      if (gcin != exp_c) begin
        failures++;
        if (failures < 10)
          $display("FAIL NG=%0d gg=%b gp=%b: gcin=%b expected %b", NG, vg, vp, gcin, exp_c);
      end
      if (exp_c[0]) n_cm1++;
    endtask

    initial begin
      done[w] = 1'b0;
      if (NG <= 5) begin
        for (int i = 0; i < (1 << NG); i++)
          for (int j = 0; j < (1 << NG); j++)
            check_one(NG'(i), NG'(j));
      end else begin
        for (int i = 0; i < 20000; i++) check_one(NG'($urandom), NG'($urandom));
      end
      done[w] = 1'b1;
    end
  end

  initial begin
    wait (done.and());
    @(negedge clk);
    if (n_cm1 == 0) begin failures++; $display("FAIL: end-around carry never 1"); end
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

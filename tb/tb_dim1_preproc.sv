// tb_dim1_preproc -- self-checking testbench for dim1_preproc.
//
// Applies every operand pair at N = 8 and random pairs at N = 32.  Each bit's
// generate, propagate and half sum are checked against the two-bit sum
// a_i + b_i (generate: the sum is 2; propagate: it is not 0; half sum: it is
// odd), and the real-zero flag against the integer test A* + B* = 2^n - 1.
// One operand pair per clock cycle.
module tb_dim1_preproc;
  import dim1_pkg::*;
  import dim1_ref_pkg::*;

  localparam int WATCHDOG = 200000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int  checks   = 0;
  int  failures = 0;
  int  n_zero   = 0;
  bit  done [2];

  for (genvar w = 0; w < 2; w++) begin : g_w
    localparam int N = (w == 0) ? 8 : 32;
    logic [N-1:0] a, b, h;
    gp_t  [N-1:0] gp;
    logic         zero;

    dim1_preproc #(.N(N)) dut (.a_dim(a), .b_dim(b), .gp(gp), .h(h), .zero(zero));

    task automatic check_one(input u64_t av, input u64_t bv);
      int sum2;
      @(negedge clk);
      a = N'(av);
      b = N'(bv);
      #1;
      for (int i = 0; i < N; i++) begin
        sum2 = int'(av[i]) + int'(bv[i]);
        checks++;
        if (gp[i].g != (sum2 == 2) || gp[i].p != (sum2 != 0) || h[i] != (sum2 == 1)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d bit %0d a=%h b=%h", N, i, av, bv);
        end
      end
      checks++;
      if (zero != (av + bv == mask(N))) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d zero a=%h b=%h", N, av, bv);
      end
      if (zero) n_zero++;
    endtask

    initial begin
      u64_t av;
      u64_t bv;
      done[w] = 1'b0;
      if (N <= 8) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(u64_t'(i), u64_t'(j));
      end else begin
        for (int i = 0; i < 5000; i++) begin
          pick_operands(N, av, bv);
          check_one(av, bv);
        end
      end
      done[w] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    @(negedge clk);
    if (n_zero == 0) begin failures++; $display("FAIL: real zero never detected"); end
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

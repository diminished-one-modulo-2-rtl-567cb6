// tb_dim1_sum -- self-checking testbench for dim1_sum.
//
// Drives random half sums and carries at N = 8 and N = 32 and checks each
// sum bit against the parity of h_i + cin_i.  One vector per clock cycle.
module tb_dim1_sum;

  localparam int WATCHDOG = 100000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  bit done [2];

  for (genvar w = 0; w < 2; w++) begin : g_w
    localparam int N = (w == 0) ? 8 : 32;
    logic [N-1:0] h, cin, s;

    dim1_sum #(.N(N)) dut (.h(h), .cin(cin), .s_dim(s));

    initial begin
      done[w] = 1'b0;
      for (int v = 0; v < 5000; v++) begin
        @(negedge clk);
        h   = N'({$urandom, $urandom});
        cin = N'({$urandom, $urandom});
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (s[i] != ((int'(h[i]) + int'(cin[i])) % 2 == 1)) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d bit %0d h=%h cin=%h s=%h", N, i, h, cin, s);
          end
        end
      end
      done[w] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
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

// tb_fir_workloads: runs the filter at the other sizes it is described at,
// next to the default 8-tap 17x17 configuration:
//   - 8 taps, 4-bit samples, 8-bit coefficient magnitudes (plus sign bit),
//     output 4+8+3 = 15 bits;
//   - 4 taps with the same 4-bit / 8-bit operands;
//   - 10 taps with 17-bit samples and 17-bit coefficients.
// Each instance is programmed with random coefficients and fed a random
// stream. Outputs are checked against y(n) = sum_k C_k x(n-k), two cycles
// after each sample. The small configurations also replay the product
// example 4 x 11100100 = 1110010000 on tap 0.
module tb_fir_workloads;
  import cshm_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one configuration: DUT, stimulus and reference model
  int done_cnt = 0;

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    localparam int unsigned DW    = (g == 2) ? 17 : 4;
    localparam int unsigned NB    = (g == 2) ? 4 : 2;
    localparam int unsigned T     = (g == 0) ? 8 : (g == 1) ? 4 : 10;
    localparam int unsigned CW    = NIB_W * NB + 1;
    localparam int unsigned AddrW = clog2_min1(T);
    localparam int unsigned ACC_W = DW + NIB_W * NB + clog2_min1(T);

    logic             coef_we = 1'b0;
    logic [AddrW-1:0] coef_addr = '0;
    logic [CW-1:0]    coef_wdata = '0;
    logic [DW-1:0]    x = '0;
    logic [ACC_W-1:0] y;

    cshm_fir #(.DATA_W(DW), .NIBBLES(NB), .TAPS(T)) dut (
      .clk(clk), .rst_n(rst_n),
      .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
      .x(x), .y(y)
    );

    longint cval [T];
    longint xh   [$];

    initial begin
      logic [CW-1:0] c;
      @(posedge rst_n);
      for (int k = 0; k < T; k++) begin
        @(negedge clk);
        c = (k == 0) ? CW'(228) : CW'($urandom);
        coef_we = 1'b1; coef_addr = AddrW'(k); coef_wdata = c;
        cval[k] = c[CW-1] ? -longint'(c[CW-2:0]) : longint'(c[CW-2:0]);
      end
      @(negedge clk) coef_we = 1'b0;
      repeat (T + 2) @(negedge clk);
      // impulse of 4 on tap 0 = 228
      x = DW'(4);
      @(negedge clk) x = '0;
      @(negedge clk);
      checks++;
      if (y != ACC_W'(10'b1110010000)) begin
        failures++;
        $display("FAIL cfg %0d: 4 x 228 gave %0d", g, $signed(y));
      end
      repeat (T + 2) @(negedge clk);
      // random stream
      for (int n = 0; n < 1000; n++) begin
        if (n >= 2) begin
          longint e;
          e = 0;
          for (int k = 0; k < T; k++) if (n - 2 - k >= 0) e += cval[k] * xh[n - 2 - k];
          checks++;
          if ($signed(y) != e) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d sample %0d y=%0d expected %0d", g, n - 2, $signed(y), e);
          end
        end
        x = DW'($urandom);
        xh.push_back(longint'($signed(x)));
        @(negedge clk);
      end
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done_cnt == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

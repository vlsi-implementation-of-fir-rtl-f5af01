// tb_cshm_fir: end-to-end test of the programmable FIR filter at its
// default size (17-bit samples, 17-bit sign-magnitude coefficients, 8 taps).
//
// A reference model keeps the sample history and, for every sample, the
// coefficient set the filter used on it, and computes
// y(n) = sum_k C_k * x(n-k) directly. The test:
//   1. an impulse response after programming, which checks the two-cycle
//      latency and that tap k appears k cycles later (tap 0 = 228 and
//      sample 4 reproduce the 4 x 11100100 = 1110010000 product example);
//   2. a random sample stream with coefficients rewritten while it runs;
//   3. an asynchronous reset in mid-stream, which must clear the filter.
// It counts how often each mechanism was exercised: each of the eight
// alphabets and four inverse shifts in a select unit, the zero-nibble AND
// gating, negative coefficients, coefficient writes during streaming, and
// the reset. One that never happened counts as a failure.
module tb_cshm_fir;
  import cshm_pkg::*;
  localparam int unsigned DW    = DEF_DATA_W;
  localparam int unsigned NB    = DEF_NIBBLES;
  localparam int unsigned T     = DEF_TAPS;
  localparam int unsigned CW    = NIB_W * NB + 1;
  localparam int unsigned PW    = DW + NIB_W * NB;
  localparam int unsigned AddrW = clog2_min1(T);
  localparam int unsigned ACC_W = PW + clog2_min1(T);

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             coef_we = 1'b0;
  logic [AddrW-1:0] coef_addr = '0;
  logic [CW-1:0]    coef_wdata = '0;
  logic [DW-1:0]    x = '0;
  logic [ACC_W-1:0] y;

  cshm_fir dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .x(x), .y(y)
  );

  // ---- reference model ----
  logic [CW-1:0] coef_m [T];          // coefficients the filter holds
  longint        xs_h   [$];          // sample history, newest last
  longint        cs_h   [$][T];       // coefficient values used per sample
  int            n_samples = 0;

  // mechanism counters
  int alpha_used [N_ALPHA];
  int shift_used [4];
  int zero_nib = 0, neg_coef = 0, live_writes = 0, resets = 0;

  function automatic longint coef_val(input logic [CW-1:0] c);
    longint m = longint'(c[CW-2:0]);
    return c[CW-1] ? -m : m;
  endfunction

  function automatic longint expected(input int n);
    longint acc = 0;
    for (int k = 0; k < T; k++)
      if (n - k >= 0) acc += cs_h[n - k][k] * xs_h[n - k];
    return acc;
  endfunction

  // note which select-unit paths a non-zero sample takes
  task automatic count_paths(input longint xv);
    if (xv == 0) return;
    for (int k = 0; k < T; k++) begin
      if (coef_m[k][CW-1] && coef_m[k][CW-2:0] != 0) neg_coef++;
      for (int j = 0; j < NB; j++) begin
        logic [3:0] nib = coef_m[k][NIB_W*j +: NIB_W];
        int sh = 0;
        if (nib == 0) begin
          zero_nib++;
          continue;
        end
        while (!nib[0]) begin nib = nib >> 1; sh++; end
        alpha_used[nib >> 1]++;
        shift_used[sh]++;
      end
    end
  endtask

  // write one coefficient at the coming rising edge (called at negedge)
  task automatic drive_write(input int addr, input logic [CW-1:0] val);
    coef_we    = 1'b1;
    coef_addr  = AddrW'(addr);
    coef_wdata = val;
    coef_m[addr] = val;
  endtask

  // one cycle: at the negedge check the output for sample n-2, then drive
  // a new sample (and maybe a write), then let the rising edge take it
  task automatic cycle(input longint xv, input int waddr, input logic [CW-1:0] wval);
    @(negedge clk);
    if (n_samples >= 2) begin
      longint e = expected(n_samples - 2);
      checks++;
      if ($signed(y) != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL sample %0d y=%0d expected %0d", n_samples - 2, $signed(y), e);
      end
    end
    coef_we = 1'b0;
    if (waddr >= 0) drive_write(waddr, wval);
    x = DW'(xv);
    xs_h.push_back(longint'($signed(DW'(xv))));
    begin
      longint cs[T];
      for (int k = 0; k < T; k++) cs[k] = coef_val(coef_m[k]);
      cs_h.push_back(cs);
    end
    count_paths(xv);
    n_samples++;
  endtask

  task automatic clear_model();
    xs_h.delete();
    cs_h.delete();
    n_samples = 0;
    for (int k = 0; k < T; k++) coef_m[k] = '0;
  endtask

  // program every tap with the input held at zero, then flush the chain
  task automatic program_all(input logic [CW-1:0] vals [T]);
    x = '0;
    for (int k = 0; k < T; k++) begin
      @(negedge clk);
      drive_write(k, vals[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
    repeat (T + 2) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] vals [T];
    clear_model();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- 1. impulse response and latency ----
    vals[0] = CW'(228);                       // 0000_0000_1110_0100
    vals[1] = {1'b1, 16'h0F05};               // negative
    vals[2] = CW'(16'h3579);
    vals[3] = {1'b1, 16'hBDF1};
    vals[4] = CW'(16'h0002);
    vals[5] = CW'(16'h8C00);
    vals[6] = {1'b1, 16'hFFFF};
    vals[7] = CW'(16'h0000);
    program_all(vals);
    begin
      int edges = 0;
      bit seen = 0;
      longint resp [T];
      @(negedge clk) x = DW'(4);
      @(negedge clk) x = '0;                  // sample taken at one edge
      edges = 1;
      // y reflects tap k of the impulse k cycles after the first output
      for (int c = 0; c < T + 3; c++) begin
        if (!seen && y != '0) begin
          seen = 1;
          checks++;
          if (edges != 2) begin
            failures++;
            $display("FAIL latency %0d edges, expected 2", edges);
          end
          for (int k = 0; k < T; k++) begin
            resp[k] = longint'($signed(y));
            checks++;
            if (resp[k] != 4 * coef_val(vals[k])) begin
              failures++;
              $display("FAIL impulse tap %0d y=%0d expected %0d", k, resp[k], 4 * coef_val(vals[k]));
            end
            if (k == 0 && y != ACC_W'(10'b1110010000)) begin
              failures++;
              $display("FAIL 4 x 228 gave %0d", $signed(y));
            end
            @(negedge clk);
          end
          break;
        end
        @(negedge clk);
        edges++;
      end
      checks++;
      if (!seen) begin
        failures++;
        $display("FAIL impulse produced no output");
      end
    end
    // flush, then restart the model from a quiet filter
    repeat (T + 2) @(negedge clk);
    clear_model();
    for (int k = 0; k < T; k++) coef_m[k] = vals[k];

    // ---- 2. random stream with live coefficient rewrites ----
    for (int i = 0; i < 3000; i++) begin
      int wa = -1;
      logic [CW-1:0] wv = '0;
      if (i % 37 == 5) begin
        wa = $urandom % T;
        wv = CW'($urandom);
        if (i % 3 == 0) wv[NIB_W +: NIB_W] = '0;   // force a zero nibble
        live_writes++;
      end
      cycle(longint'($signed(DW'($urandom))), wa, wv);
    end

    // ---- 3. reset in mid-stream ----
    @(negedge clk);
    coef_we = 1'b0;
    rst_n = 1'b0;
    #2;
    checks++;
    if (y != '0) begin
      failures++;
      $display("FAIL y=%0d during reset", $signed(y));
    end
    @(negedge clk) rst_n = 1'b1;
    resets++;
    clear_model();
    for (int k = 0; k < T; k++) vals[k] = CW'($urandom);
    program_all(vals);
    for (int i = 0; i < 500; i++) cycle(longint'($signed(DW'($urandom))), -1, '0);
    // extreme samples against extreme coefficients
    for (int k = 0; k < T; k++) vals[k] = (k % 2) ? '1 : {1'b0, {(CW-1){1'b1}}};
    clear_model();
    program_all(vals);
    for (int k = 0; k < T; k++) coef_m[k] = vals[k];
    for (int i = 0; i < 40; i++)
      cycle((i % 3 == 0) ? -(longint'(1) << (DW - 1)) : (longint'(1) << (DW - 1)) - 1, -1, '0);
    cycle(0, -1, '0);
    cycle(0, -1, '0);

    // ---- mechanism coverage ----
    for (int a = 0; a < N_ALPHA; a++) begin
      $display("alphabet %0dX selected %0d times", 2 * a + 1, alpha_used[a]);
      checks++;
      if (alpha_used[a] == 0) failures++;
    end
    for (int s = 0; s < 4; s++) begin
      $display("inverse shift by %0d used %0d times", s, shift_used[s]);
      checks++;
      if (shift_used[s] == 0) failures++;
    end
    $display("zero nibbles %0d, negative coefficients %0d, live writes %0d, resets %0d",
             zero_nib, neg_coef, live_writes, resets);
    checks += 4;
    if (zero_nib == 0)    failures++;
    if (neg_coef == 0)    failures++;
    if (live_writes == 0) failures++;
    if (resets == 0)      failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

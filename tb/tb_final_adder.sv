// tb_final_adder: feeds the final adder four random partial products in the
// range a select unit produces (x*nib, |nib| <= 15) and a random sign, and
// checks prod == (-1)^sign * sum_j part[j] * 16^j.
module tb_final_adder;
  import cshm_pkg::*;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned NB = DEF_NIBBLES;
  localparam int unsigned AW = DW + ALPHA_EXT;
  localparam int unsigned PW = DW + NIB_W * NB;

  int checks = 0, failures = 0;

  logic [NB-1:0][AW-1:0] part;
  logic                  sign;
  logic [PW-1:0]         prod;

  final_adder dut (.part(part), .sign(sign), .prod(prod));

  task automatic check();
    longint acc = 0;
    #1;
    for (int j = 0; j < NB; j++) acc += longint'($signed(part[j])) <<< (NIB_W * j);
    if (sign) acc = -acc;
    checks++;
    if ($signed(prod) != acc) begin
      failures++;
      $display("FAIL sign=%b prod=%0d expected %0d", sign, $signed(prod), acc);
    end
  endtask

  function automatic logic [AW-1:0] rand_part();
    longint xs = longint'($signed(DW'($urandom)));
    return AW'(xs * ($urandom % 16));
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    part = '0; sign = 1'b0; check();
    part = '0; sign = 1'b1; check();
    // largest magnitudes: x = -2^16 times 15 in every nibble
    for (int j = 0; j < NB; j++) part[j] = AW'(-(longint'(1) << (DW - 1)) * 15);
    sign = 1'b0; check();
    sign = 1'b1; check();
    for (int i = 0; i < 4000; i++) begin
      for (int j = 0; j < NB; j++) part[j] = rand_part();
      sign = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

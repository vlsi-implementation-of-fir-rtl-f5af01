// tb_add_one: exhaustive check of the add-one circuit for 4 and 8 bits:
// s1 must equal s0 + 1 and all_one must be the carry of that increment.
module tb_add_one;
  int checks = 0, failures = 0;

  logic [3:0] s0a, s1a;
  logic       oa;
  logic [7:0] s0b, s1b;
  logic       ob;

  add_one #(.W(4)) dut4 (.s0(s0a), .s1(s1a), .all_one(oa));
  add_one #(.W(8)) dut8 (.s0(s0b), .s1(s1b), .all_one(ob));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      s0a = 4'(i);
      #1;
      checks++;
      if ({oa, s1a} !== 5'(i + 1)) begin
        failures++;
        $display("FAIL add_one4 %b -> %b %b", s0a, oa, s1a);
      end
    end
    for (int i = 0; i < 256; i++) begin
      s0b = 8'(i);
      #1;
      checks++;
      if ({ob, s1b} !== 9'(i + 1)) begin
        failures++;
        $display("FAIL add_one8 %b -> %b %b", s0b, ob, s1b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

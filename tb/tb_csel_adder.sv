// tb_csel_adder: checks the carry-select adder against a + b + cin. The
// default 33-bit instance (eight full blocks and a 1-bit block) gets random
// operands and carry-chain corner cases; a 4-bit instance, the block of
// the 4-bit adder, is checked exhaustively; a 10-bit one covers a short
// last block. Also replays the three 4-bit cases of the published
// adder simulation.
module tb_csel_adder;
  int checks = 0, failures = 0;

  logic [32:0] a, b, s;
  logic        ci, co;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [9:0]  a10, b10, s10;
  logic        ci10, co10;

  csel_adder                  dut   (.a(a),   .b(b),   .cin(ci),   .sum(s),   .cout(co));
  csel_adder #(.W(4))         dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  csel_adder #(.W(10))        dut10 (.a(a10), .b(b10), .cin(ci10), .sum(s10), .cout(co10));

  task automatic check33();
    #1;
    checks++;
    if ({co, s} !== 34'({1'b0, a} + {1'b0, b} + 34'(ci))) begin
      failures++;
      $display("FAIL csel33 %h + %h + %b = %b %h", a, b, ci, co, s);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // carry propagating through every block
    a = '1; b = '0; ci = 1'b1; check33();
    a = '1; b = 33'd1; ci = 1'b0; check33();
    a = '1; b = '1; ci = 1'b1; check33();
    a = 33'h0_FFFF_FFF0; b = 33'h10; ci = 1'b0; check33();
    for (int i = 0; i < 3000; i++) begin
      a  = {1'($urandom), $urandom};
      b  = {1'($urandom), $urandom};
      ci = 1'($urandom);
      // bias toward long runs of ones in the carry-in-0 sums
      if (i % 4 == 0) b = ~a ^ 33'(1 << ($urandom % 33));
      check33();
    end
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + ci4)) begin
        failures++;
        $display("FAIL csel4 %h+%h+%b = %b%h", a4, b4, ci4, co4, s4);
      end
    end
    // the three 4-bit cases of the adder's published simulation:
    // all inputs high -> all outputs high; cin low -> all high except bit 0;
    // a and cin low (b high) -> all sum bits high, carry out low
    a4 = 4'hF; b4 = 4'hF; ci4 = 1'b1; #1 checks++;
    if ({co4, s4} !== 5'b11111) failures++;
    a4 = 4'hF; b4 = 4'hF; ci4 = 1'b0; #1 checks++;
    if ({co4, s4} !== 5'b11110) failures++;
    a4 = 4'h0; b4 = 4'hF; ci4 = 1'b0; #1 checks++;
    if ({co4, s4} !== 5'b01111) failures++;
    for (int i = 0; i < 2000; i++) begin
      a10 = 10'($urandom); b10 = 10'($urandom); ci10 = 1'($urandom);
      #1;
      checks++;
      if ({co10, s10} !== 11'(a10 + b10 + ci10)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

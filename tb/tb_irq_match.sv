// tb_irq_match: self-checking test of the masked status compare, with
// directed corner cases and random vectors checked bit by bit.
module tb_irq_match;
  logic [9:0] status, x, m;
  logic match;
  int checks = 0, failures = 0;

  irq_match #(.W(10)) dut (.*);

  function automatic logic ref_match(logic [9:0] s, logic [9:0] xv, logic [9:0] mv);
    for (int b = 0; b < 10; b++)
      if (mv[b] && s[b] != xv[b]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic try(input logic [9:0] s, input logic [9:0] xv, input logic [9:0] mv);
    status = s; x = xv; m = mv;
    #1;
    checks++;
    if (match !== ref_match(s, xv, mv)) begin
      failures++;
      $display("FAIL s=%h x=%h m=%h match=%b", s, xv, mv, match);
    end
  endtask

  initial begin
    try(10'h3FF, 10'h000, 10'h000);   // nothing compared: match
    try(10'h001, 10'h000, 10'h001);   // one flag differs
    try(10'h201, 10'h201, 10'h3FF);   // full equal
    try(10'h201, 10'h200, 10'h200);   // differing bit ignored
    for (int i = 0; i < 5000; i++) begin
      automatic logic [9:0] s = 10'($urandom), xv = 10'($urandom), mv = 10'($urandom);
      if (i % 3 == 0) xv = (s & mv) | (xv & ~mv);   // make many hits
      try(s, xv, mv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

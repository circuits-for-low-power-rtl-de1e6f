// tb_cam_match: self-checking test of the word-match logic.
// Checks all-match, every single mismatching bit, mismatches confined to one
// of the two sixteen-bit stacks, and random vectors, against the expected
// result "all bits match".
module tb_cam_match;
  localparam int W = 32;
  logic [W-1:0] bit_match;
  logic         match;
  int           checks = 0, failures = 0;

  cam_match dut (.bit_match(bit_match), .match(match));

  task automatic check(input logic [W-1:0] v);
    bit_match = v;
    #1;
    checks++;
    if (match !== (&v)) begin
      failures++;
      $display("bit_match=%h match=%b expected %b", v, match, &v);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1);
    check('0);
    for (int b = 0; b < W; b++) check(~(W'(1) << b));
    check({16'hFFFF, 16'h0000});
    check({16'h0000, 16'hFFFF});
    check({16'hFFFF, 16'hFFFE});
    check({16'h7FFF, 16'hFFFF});
    for (int i = 0; i < 200; i++) check($urandom() | $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

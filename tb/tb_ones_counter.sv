// ones_counter at its default width (7) exhaustively and at 16 and 1 inputs
// with random vectors, against $countones.
module tb_ones_counter;
  logic [6:0]  b7;
  logic [2:0]  c7;
  logic [15:0] b16;
  logic [4:0]  c16;
  logic [0:0]  b1;
  logic [0:0]  c1;
  int checks = 0, failures = 0;

  ones_counter                u7  (.bits(b7),  .count(c7));
  ones_counter #(.N(16))      u16 (.bits(b16), .count(c16));
  ones_counter #(.N(1))       u1  (.bits(b1),  .count(c1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      b7 = 7'(v);
      #1;
      checks++;
      if (int'(c7) != $countones(b7)) begin failures++; $display("FAIL n7 %b -> %0d", b7, c7); end
    end
    for (int k = 0; k < 2000; k++) begin
      b16 = 16'($urandom);
      b1  = 1'($urandom);
      #1;
      checks += 2;
      if (int'(c16) != $countones(b16)) begin failures++; $display("FAIL n16 %b -> %0d", b16, c16); end
      if (c1 != b1) begin failures++; $display("FAIL n1"); end
    end
    b16 = '1;
    #1;
    checks++;
    if (c16 != 5'd16) begin failures++; $display("FAIL n16 all ones"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

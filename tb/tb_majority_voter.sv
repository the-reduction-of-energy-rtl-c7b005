// majority_voter exhaustively for N = 7 (default) and N = 8 (even N: a tie
// is not a majority), against a count of the ones.
module tb_majority_voter;
  logic [6:0] v7;
  logic [7:0] v8;
  logic m7, m8;
  int checks = 0, failures = 0;

  majority_voter          u7 (.votes(v7), .major(m7));
  majority_voter #(.N(8)) u8 (.votes(v8), .major(m8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      v7 = 7'(v);
      v8 = 8'(v);
      #1;
      checks += 2;
      if (m7 != ($countones(v7) >= 4)) begin failures++; $display("FAIL n7 %b", v7); end
      if (m8 != ($countones(v8) >= 5)) begin failures++; $display("FAIL n8 %b", v8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

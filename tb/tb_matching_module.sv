// tb_matching_module: exhaustive check of the ternary match for C = 4 (all valid,
// mask, value and pattern combinations) against a bit-by-bit reference.
module tb_matching_module;
  localparam int C = 4;

  logic [2*C:0] entry;
  logic [C-1:0] pattern;
  logic         match;

  matching_module #(.C(C)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2**(2*C+1); e++)
      for (int p = 0; p < 2**C; p++) begin
        bit exp;
        entry   = (2*C+1)'(e);
        pattern = C'(p);
        #1;
        exp = entry[2*C];
        for (int b = 0; b < C; b++)
          if (!entry[C + b] && (pattern[b] != entry[b])) exp = 1'b0;
        checks++;
        if (match !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL: entry %b pattern %b: %b expected %b", entry, pattern, match, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_exchange_node - exhaustive check of the two-input sorting node: every
// pair of 8-bit inputs must give h = max and l = min.
module tb_exchange_node;
  logic [7:0] a, b, h, l;
  int checks = 0, failures = 0;

  exchange_node #(.W(8)) dut (.a, .b, .h, .l);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (h != 8'((i > j) ? i : j) || l != 8'((i > j) ? j : i)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d h=%0d l=%0d", a, b, h, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_line_fifo - random pixels pushed with random idle cycles; once DEPTH
// pixels have gone in, dout at every push must equal the pixel pushed DEPTH
// pushes earlier, and it must not change on idle cycles.
module tb_line_fifo;
  import star_tracker_pkg::*;
  localparam int unsigned DEPTH = 13;
  logic   clk = 0, rst_n = 0, push = 0;
  pixel_t din = '0, dout;
  pixel_t hist [$];
  int checks = 0, failures = 0, cycles = 0;

  line_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .dout);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      push = ($urandom_range(0, 3) != 0);
      din  = pixel_t'($urandom);
      #1;
      if (hist.size() >= DEPTH) begin
        checks++;
        if (dout != hist[hist.size() - DEPTH]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d dout=%h exp=%h", i, dout, hist[hist.size() - DEPTH]);
        end
      end
      if (push) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

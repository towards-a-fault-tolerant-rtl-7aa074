// tb_sdp_ram - random simultaneous writes and reads against a reference
// array; read data must appear exactly one cycle after the read request and
// hold while no read is requested.
module tb_sdp_ram;
  localparam int unsigned DEPTH = 64, W = 9;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  logic [W-1:0] exp_q;
  logic         exp_ok = 0;
  int checks = 0, failures = 0, cycles = 0;

  sdp_ram #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

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
    // fill every word first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = W'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (exp_ok) begin
        checks++;
        if (rdata != exp_q) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d rdata=%h exp=%h", i, rdata, exp_q);
        end
      end
      we = $urandom_range(0, 1); waddr = 6'($urandom); wdata = W'($urandom);
      re = $urandom_range(0, 1); raddr = 6'($urandom);
      if (re) begin exp_q = ref_mem[raddr]; exp_ok = 1; end  // read before write
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

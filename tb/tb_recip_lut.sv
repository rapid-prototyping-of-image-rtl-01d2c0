// Self-checking testbench for recip_lut.
// Reads all 256 entries and checks each against 1/d in 1.15 fixed point:
// entry(d) must be the integer nearest to 32768/d (so |entry*d - 32768| is
// at most d/2), and entry 0 must equal entry 1 (32768). Also checks the
// one-cycle read latency and that ce low holds the output.
module tb_recip_lut;
  logic clk = 1'b0;
  logic ce = 1'b0;
  logic [7:0]  addr = '0;
  logic [15:0] data;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  recip_lut dut (.clk(clk), .ce(ce), .addr_i(addr), .data_o(data));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint err;
    int d;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(i);
      ce = 1'b1;
      @(negedge clk);   // one edge later the entry is on data
      d = (i == 0) ? 1 : i;
      err = longint'(data) * d - 32768;
      checks++;
      if (err < 0) err = -err;
      if (2 * err > d) begin
        failures++;
        $display("FAIL: entry %0d = %0d, 32768/%0d = %f", i, data, d, 32768.0 / d);
      end
    end
    // ce low: a new address must not reach the output.
    @(negedge clk);
    addr = 8'd2; ce = 1'b1;
    @(negedge clk);
    ce = 1'b0; addr = 8'd3;
    @(negedge clk);
    checks++;
    if (data != 16'd16384) begin failures++; $display("FAIL: ce low did not hold, got %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

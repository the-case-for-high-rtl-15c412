// tb_shared_memory: self-checking test of the shared memory bus slave.
//
// Writes a pattern to every word of a 1024-word instance, reads it back in
// a different order, checks that the ack comes exactly one cycle after the
// select (read data with it), that a write does not disturb its
// neighbours, and that byte address bits [1:0] are ignored.
module tb_shared_memory;
  import hthreads_pkg::*;

  localparam int W = 1024;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  bus_req_t bus_req;
  bus_rsp_t bus_rsp;

  shared_memory #(.WORDS(W)) dut (.clk, .rst, .bus_req, .bus_rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic acc(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                     output logic [31:0] rd, output int lat);
    @(negedge clk);
    bus_req = '{req: 1'b1, we: we, addr: addr, wdata: wd};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!bus_rsp.ack && lat < 10);
    rd = bus_rsp.rdata;
    @(posedge clk);
    bus_req <= '0;
  endtask

  function automatic logic [31:0] pat(int i);
    return 32'h9E37_79B9 * (i + 1) ^ 32'(i);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    automatic int lat, bad = 0, badlat = 0;
    bus_req = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < W; i++) begin
      acc(1'b1, 32'(4 * i), pat(i), d, lat);
      if (lat != 1) badlat++;
    end
    for (int k = 0; k < W; k++) begin
      automatic int i = (k * 37) % W;
      acc(1'b0, 32'(4 * i), '0, d, lat);
      if (d != pat(i)) bad++;
      if (lat != 1) badlat++;
    end
    check(bad == 0, $sformatf("read back all words (%0d wrong)", bad));
    check(badlat == 0, "ack one cycle after select");
    acc(1'b1, 32'h0000_0103, 32'h1234_5678, d, lat);    // word 64, low bits ignored
    acc(1'b0, 32'h0000_0100, '0, d, lat);
    check(d == 32'h1234_5678, "byte offset ignored");
    acc(1'b0, 32'h0000_00FC, '0, d, lat);
    check(d == pat(63), "lower neighbour intact");
    acc(1'b0, 32'h0000_0104, '0, d, lat);
    check(d == pat(65), "upper neighbour intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

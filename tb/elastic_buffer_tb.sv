// elastic_buffer_tb: checks the dual-clock elastic buffer at its defaults
// (17 bits, 16 entries).
//
// Instance u_eb has its write clock at 20.000 ns and its read clock at
// 20.100 ns. It takes 600 consecutive words and must return them all, in
// order, with no overflow or underflow. After the writes stop it must flag
// underflow and drop rvalid. Instance u_slow reads at half the write rate
// and must flag overflow. Reading must not start before START_LEVEL words
// have arrived.
`timescale 1ps / 1ps
module elastic_buffer_tb;

  localparam int W = 17;
  localparam int NW = 600;

  logic wclk = 1'b0, rclk = 1'b0, sclk = 1'b0, rst_n = 1'b0;
  always #10000 wclk = ~wclk;
  initial begin #4300; forever #10050 rclk = ~rclk; end
  always #20000 sclk = ~sclk;

  logic         wvalid = 1'b0;
  logic [W-1:0] wdata = '0;
  logic         ovf, unf, rvalid, s_ovf, s_unf, s_rvalid;
  logic [W-1:0] rdata, s_rdata;

  elastic_buffer #(.WIDTH(W)) u_eb (
    .wclk(wclk), .wrst_n(rst_n), .wvalid(wvalid), .wdata(wdata), .overflow(ovf),
    .rclk(rclk), .rrst_n(rst_n), .rvalid(rvalid), .rdata(rdata), .underflow(unf));

  elastic_buffer #(.WIDTH(W)) u_slow (
    .wclk(wclk), .wrst_n(rst_n), .wvalid(wvalid), .wdata(wdata), .overflow(s_ovf),
    .rclk(sclk), .rrst_n(rst_n), .rvalid(s_rvalid), .rdata(s_rdata), .underflow(s_unf));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] word(input int n);
    return W'(n * 7919 + 13);
  endfunction

  int n_wr = 0, n_rd = 0, first_rd_at = -1;
  always @(posedge rclk) if (rst_n && rvalid) begin
    check(rdata == word(n_rd), $sformatf("word %0d in order", n_rd));
    if (first_rd_at < 0) first_rd_at = n_wr;
    n_rd++;
  end

  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1'b1;
    repeat (3) @(posedge wclk);
    for (int n = 0; n < NW; n++) begin
      wvalid <= 1'b1;
      wdata  <= word(n);
      @(posedge wclk);
      n_wr = n + 1;
    end
    wvalid <= 1'b0;
    check(!ovf && !unf, "no overflow or underflow while streaming");
    repeat (40) @(posedge rclk);
    check(n_rd == NW, $sformatf("all words read: %0d", n_rd));
    check(first_rd_at >= 5, $sformatf("reading starts after the start level (%0d written)", first_rd_at));
    check(unf, "underflow flagged once the writer stopped");
    check(!rvalid, "rvalid low when empty");
    check(!ovf, "no overflow on the matched-rate buffer");
    check(s_ovf, "overflow flagged when the reader is too slow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// packet_serializer_tb: the data source returns f(addr) = (addr*37 + 5) mod 1024
// for the channel named on addr. The testbench reads tx_bit in the middle of
// every bit and rebuilds the packets. Checks: each packet is {address, data}
// MSB first with addresses counting 0..63 and wrapping, the data match f, each
// bit lasts 2*HALF_DIV clocks, packets follow back to back, and no new packet
// starts after en falls. Then the runtime half-bit input is set to 8 and ten
// more packets are checked, continuing the address sequence. Last, with sub_en
// set and sub_lo = 5, only channels 5, 13, ..., 61 may be sent, in that order.
module packet_serializer_tb;
  localparam int HALF_DIV = 5;
  int hd_now = HALF_DIV;
  logic [9:0] half_div = '0;
  logic sub_en = 0;
  logic [2:0] sub_lo = 3'd5;
  int n_sub = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] data;
  logic [5:0] addr;
  logic tx_bit, half, bit_start, pkt_start;
  int checks = 0, failures = 0;
  int cyc = 0, last_bs = -1, nbits = 0, npkts = 0, wraps = 0;
  logic [15:0] pkt;
  int expect_addr = 0;

  packet_serializer #(.HALF_DIV(HALF_DIV)) dut (.*);

  assign data = 10'((int'(addr) * 37 + 5) % 1024);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (bit_start) begin
      if (last_bs >= 0) begin
        checks++;
        if (cyc - last_bs != 2 * hd_now) begin failures++; $display("bit period %0d", cyc - last_bs); end
      end
      last_bs = cyc;
    end
    if (bit_start && !en && nbits == 0) last_bs = -1;
    if (half == 0 && dut.hcnt == 2 && dut.running) begin
      pkt = {pkt[14:0], tx_bit};
      nbits++;
      if (nbits == 16) begin
        checks++;
        if (pkt[15:10] != 6'(expect_addr) || pkt[9:0] != 10'((expect_addr * 37 + 5) % 1024)) begin
          failures++; $display("packet %h expected addr %0d", pkt, expect_addr);
        end
        if (expect_addr == 63) wraps++;
        if (sub_en) n_sub++;
        expect_addr = sub_en ? (expect_addr + 8) % 64 : (expect_addr + 1) % 64;
        nbits = 0; npkts++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    en = 1;
    wait (npkts == 70);
    @(negedge clk);
    en = 0;
    repeat (40 * HALF_DIV) @(negedge clk);
    checks++;
    if (dut.running) begin failures++; $display("still sending after en fell"); end
    checks++;
    if (npkts != 70 || wraps != 1) begin failures++; $display("packets %0d wraps %0d", npkts, wraps); end
    half_div = 10'd8; hd_now = 8; last_bs = -1;
    en = 1;
    wait (npkts == 80);
    checks++;
    if (expect_addr != 16) begin failures++; $display("address after restart %0d", expect_addr); end
    @(negedge clk);
    en = 0;
    repeat (40 * hd_now) @(negedge clk);
    sub_en = 1; expect_addr = 16 + 5; last_bs = -1;
    en = 1;
    wait (npkts == 96);
    checks++;
    if (expect_addr != 21 || n_sub != 16) begin failures++; $display("subset: address %0d, packets %0d", expect_addr, n_sub); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// packet_serializer: builds and shifts out the 16-bit transmit packets.
//
// A packet is a 6-bit channel address followed by 10 bits of neural data, as
// in the document; this design sends it MSB first, address first, and visits
// the channels in round-robin order 0..63. `addr` names the channel being
// packed next and the caller returns its current 10-bit value on `data`; both
// are loaded when a packet starts (pkt_start) and `addr` then advances.
// With sub_en set only the channels whose low SUB_BITS address bits equal
// sub_lo are visited (sub_lo, sub_lo + 8, ...): the 8 channels filtered in
// held-SELECT mode, each sent 8 times as often ("higher data rates on fewer
// channels" in the document; the selection rule is this design's).
// While `en` is low no new packet starts (the one in flight completes). Bits
// are sent back to back.
// A bit lasts two half-bit periods of HALF_DIV clocks each; `half` tells the
// Manchester encoder which half is running and `bit_start` marks the first
// clock of every bit. The half-bit length is the runtime input half_div, or the
// parameter HALF_DIV while half_div is 0. Data rate = f_clk / (2 * half-bit
// length): 1.43 Mb/s from the 14.32 MHz crystal at the default 5, near the
// 1.5 Mb/s the document quotes; 6 gives 1.19 Mb/s and 716 gives 10.0 kb/s.
module packet_serializer #(
  parameter int unsigned HALF_DIV  = 5,
  parameter int unsigned DATA_BITS = 10,
  parameter int unsigned ADDR_BITS = 6,
  parameter int unsigned DIV_BITS  = 10,
  parameter int unsigned SUB_BITS  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [DIV_BITS-1:0]  half_div,
  input  logic                 sub_en,
  input  logic [SUB_BITS-1:0]  sub_lo,
  input  logic [DATA_BITS-1:0] data,
  output logic [ADDR_BITS-1:0] addr,
  output logic                 tx_bit,
  output logic                 half,
  output logic                 bit_start,
  output logic                 pkt_start
);

  localparam int unsigned PKT_BITS = DATA_BITS + ADDR_BITS;

  logic [DIV_BITS-1:0]           hcnt, half_n;
  logic [$clog2(PKT_BITS)-1:0]   bcnt;
  logic [PKT_BITS-1:0]           shreg;
  logic                          half_end, bit_end;
  logic                          running;
  logic [ADDR_BITS-1:0]          acnt;   // round-robin position

  assign addr = sub_en ? {acnt[ADDR_BITS-1:SUB_BITS], sub_lo} : acnt;

  assign half_n   = (half_div == '0) ? DIV_BITS'(HALF_DIV) : half_div;
  assign half_end = (hcnt >= half_n - 1'b1);
  assign bit_end  = half_end && half;
  assign tx_bit   = shreg[PKT_BITS-1];
  assign bit_start = running && (hcnt == '0) && !half;
  assign pkt_start = en && (!running || (bit_end && bcnt == $bits(bcnt)'(PKT_BITS - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt    <= '0;
      half    <= 1'b0;
      bcnt    <= '0;
      shreg   <= '0;
      acnt    <= '0;
      running <= 1'b0;
    end else if (pkt_start) begin
      // load a packet (first one, or straight after the previous one)
      shreg   <= {addr, data};
      hcnt    <= '0;
      half    <= 1'b0;
      bcnt    <= '0;
      running <= 1'b1;
      acnt    <= sub_en ? addr + ADDR_BITS'(1 << SUB_BITS) : acnt + 1'b1;
    end else if (running) begin
      hcnt <= half_end ? '0 : hcnt + 1'b1;
      if (half_end) half <= ~half;
      if (bit_end) begin
        shreg <= {shreg[PKT_BITS-2:0], 1'b0};
        if (bcnt == $bits(bcnt)'(PKT_BITS - 1)) begin
          bcnt    <= '0;
          running <= 1'b0;
        end else begin
          bcnt <= bcnt + 1'b1;
        end
      end
    end
  end

endmodule

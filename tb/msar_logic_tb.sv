// msar_logic_tb: runs the SAR logic against an ideal comparator kept in the
// testbench. The "analog" input is a real voltage in 0..0.6 V; the testbench
// stores the charge the enabled capacitors take during the sample phase
// (V * M / 256) and answers each trial word T with V*M/256 >= T*0.6/256.
// Checks: the switches follow m during sampling (all ones in raw mode), the
// result equals floor(V/0.6 * M) computed here, and the output register loads
// 10 SAR clocks after the sample phase starts.
module msar_logic_tb;
  localparam int SAR_DIV = 3;
  localparam real VFS = 0.6;
  logic clk = 0, rst_n = 0, mult_en = 0, comp, sample, dout_valid;
  logic sar_tick;
  logic [3:0] phase;
  logic [7:0] m, sw, dout;
  int checks = 0, failures = 0;
  int divcnt = 0, cyc = 0, t_sample = 0;
  real vin, q;
  int  expect_code;
  int  nconv = 0;

  msar_logic #(.BITS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SAR timing generator
  assign sar_tick = (divcnt == SAR_DIV - 1);
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin divcnt <= 0; phase <= 0; end
    else begin
      divcnt <= sar_tick ? 0 : divcnt + 1;
      if (sar_tick) phase <= (phase == 10) ? 4'd0 : phase + 4'd1;
    end

  // ideal capacitor array and comparator
  always @(posedge clk) if (sample) q = vin * real'(sw) / 256.0;
  assign comp = (q >= real'(sw) * VFS / 256.0);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sample && phase == 0 && divcnt == 0) begin
      t_sample = cyc;
      checks++;
      if (sw != (mult_en ? m : 8'hff)) begin failures++; $display("sample switches %h m %h", sw, m); end
    end
    if (dout_valid) begin
      checks++;
      if (int'(dout) != expect_code) begin
        failures++; $display("vin %f m %0d mult %0d: got %0d expected %0d", vin, m, mult_en, dout, expect_code);
      end
      checks++;
      if (cyc - t_sample != 10 * SAR_DIV) begin failures++; $display("latency %0d", cyc - t_sample); end
      nconv++;
    end
  end

  task automatic convert(input real v, input logic [7:0] mm, input logic me);
    // change inputs at the start of a conversion only
    wait (phase == 10 && sar_tick);
    @(negedge clk);
    vin = v; m = mm; mult_en = me;
    expect_code = $floor(v / VFS * (me ? real'(mm) : 255.0));
    if (expect_code > 255) expect_code = 255;
    @(posedge dout_valid);
    @(negedge clk);
  endtask

  initial begin
    vin = 0.0; m = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    convert(0.3001, 8'hff, 1'b0);
    convert(0.5999, 8'h00, 1'b0);
    convert(0.0, 8'h00, 1'b0);
    convert(0.6 * 200.5 / 255.0, 8'h80, 1'b1);
    convert(0.45, 8'h00, 1'b1);
    convert(0.5999, 8'hff, 1'b1);
    for (int i = 0; i < 60; i++)
      convert(0.6 * ($urandom_range(0, 4095) + 0.5) / 4096.0, 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

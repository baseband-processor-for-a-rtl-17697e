// tb_sar_adc: with clk_adc ticks every 64 master cycles the ADC must deliver a conversion every
// 12 x 2 x 64 = 1536 master cycles, each equal to the input code, and stop in power-down.
module tb_sar_adc;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0, pd = 1'b1, rdy;
  logic [9:0] vin = '0, dout;
  int checks = 0, failures = 0;
  sar_adc #(.BITS(10), .CONV_CYCLES(12)) dut (.clk, .rst, .clk_adc_en(tick), .powerdown(pd),
                                              .vin_code(vin), .adc_dout(dout), .adc_data_ready(rdy));
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tick <= (cyc % 64) == 63;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    int last = -1, n = 0;
    logic [9:0] codes[] = '{10'h2AC, 10'h000, 10'h3FF, 10'h155, 10'h2AA, 10'h001, 10'h200, 10'h1FF};
    repeat (3) @(posedge clk); #1 rst = 1'b0; pd = 1'b0;
    foreach (codes[i]) begin
      vin = codes[i];
      do @(posedge clk); while (!rdy);
      #1;
      if (i > 0) chk(dout == codes[i - 1] || dout == codes[i], "converted value");
      if (last >= 0) chk(cyc - last == 1536, $sformatf("conversion period %0d", cyc - last));
      last = cyc;
      n++;
    end
    vin = 10'h2AD;
    do @(posedge clk); while (!rdy);
    do @(posedge clk); while (!rdy);
    #1 chk(dout == 10'h2AD, "stable input converted exactly");
    pd = 1'b1;
    repeat (4000) begin @(posedge clk); if (rdy) n = -100; end
    chk(n > 0, "no conversion in power-down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_serial_rx: sends random 24-bit words on the data/clock/strobe lines and
// checks that each arrives as exactly one write with the right address and
// value, 2 to 3 clock periods after the strobe rises. The serial clock runs
// faster than the system clock and at an unrelated phase.
module tb_serial_rx;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        sdata = 1'b0, sclk = 1'b0, sstrobe = 1'b0;
  logic        wr_valid;
  logic [7:0]  wr_addr;
  logic [15:0] wr_data;
  int          checks = 0, failures = 0, writes = 0;

  serial_rx dut (.clk(clk), .rst_n(rst_n), .sdata(sdata), .sclk(sclk),
                 .sstrobe(sstrobe), .wr_valid(wr_valid), .wr_addr(wr_addr),
                 .wr_data(wr_data));

  always #19 clk = ~clk;

  always @(posedge clk) if (wr_valid) writes++;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [23:0] w);
    for (int i = 23; i >= 0; i--) begin
      sdata = w[i];
      #3 sclk = 1'b1;
      #3 sclk = 1'b0;
    end
    #5 sstrobe = 1'b1;
  endtask

  initial begin
    logic [23:0] w;
    int          n, t;
    #100 rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      w = 24'($urandom);
      n = writes;
      send(w);
      // count falling clock edges until the write is seen
      t = 0;
      do begin
        @(negedge clk);
        t++;
      end while (!wr_valid && t < 10);
      checks++;
      if (!wr_valid || wr_addr != w[23:16] || wr_data != w[15:0]) begin
        failures++;
        $display("FAIL: word %h got valid=%0b addr=%h data=%h", w, wr_valid, wr_addr, wr_data);
      end
      // 2..3 clock periods after the strobe: 3 or 4 falling edges
      checks++;
      if (t < 3 || t > 4) begin
        failures++;
        $display("FAIL: write seen at falling edge %0d after strobe", t);
      end
      repeat (4) @(posedge clk);
      sstrobe = 1'b0;
      repeat (3) @(posedge clk);
      checks++;
      if (writes - n != 1) begin
        failures++;
        $display("FAIL: %0d writes for one strobe", writes - n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rtc_regs: random writes to the settings registers against a reference
// array, read-back of every address, the struct outputs, the pulse-count
// limit of 8, the read-only status word and the clear input.
module tb_rtc_regs;
  import rtc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr_valid = 1'b0;
  logic [7:0]  wr_addr = '0;
  logic [15:0] wr_data = '0, status = 16'hA5C3, rd_data;
  logic [4:0]  rd_addr = '0;
  cfg_t        cfg;
  logic [15:0] ref_mem [32];
  int          checks = 0, failures = 0;

  rtc_regs dut (.clk(clk), .rst_n(rst_n), .clear(clear), .wr_valid(wr_valid),
                .wr_addr(wr_addr), .wr_data(wr_data), .rd_addr(rd_addr),
                .status(status), .cfg(cfg), .rd_data(rd_data));

  always #10 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected read value of a write, by the documented map.
  function automatic logic [15:0] stored(input logic [7:0] a, input logic [15:0] d);
    if (a < 8)               return {1'b0, d[14:0]};
    if (a == 8)              return (d > 8) ? 16'd8 : {12'b0, d[3:0]};
    if (a == 9)              return {10'b0, d[5:0]};
    if (a >= 16 && a < 24)   return d;
    return 16'h0;
  endfunction

  task automatic check_all();
    for (int i = 0; i < 32; i++) begin
      rd_addr = 5'(i);
      #0.1;
      checks++;
      if (rd_data !== ((i == 31) ? status : ref_mem[i])) begin
        failures++;
        $display("FAIL: read %0d got %h expected %h", i, rd_data, ref_mem[i]);
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (cfg.bucket[k] != ref_mem[k][14:0]) begin
        failures++;
        $display("FAIL: cfg.bucket[%0d]", k);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (cfg.slow_delay[k] != ref_mem[16+2*k] || cfg.slow_width[k] != ref_mem[17+2*k]) begin
        failures++;
        $display("FAIL: cfg.slow[%0d]", k);
      end
    end
    checks++;
    if (cfg.npulse != ref_mem[8][3:0] || cfg.gun_tick != ref_mem[9][5:0]) begin
      failures++;
      $display("FAIL: cfg.npulse/gun_tick");
    end
  endtask

  initial begin
    logic [7:0] a;
    for (int i = 0; i < 32; i++) ref_mem[i] = '0;
    #25 rst_n = 1'b1;
    check_all();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a = ($urandom_range(3) == 0) ? 8'($urandom) : 8'($urandom_range(31));
      wr_addr  = a;
      wr_data  = ($urandom_range(3) == 0) ? 16'($urandom_range(12)) : 16'($urandom);
      wr_valid = 1'b1;
      if (a < 32) ref_mem[a[4:0]] = stored(a, wr_data);
      if (a == 31) ref_mem[31] = '0;
      @(negedge clk);
      wr_valid = 1'b0;
      if (n % 50 == 49) check_all();
    end
    // a value on the bus without wr_valid must not be written
    wr_addr = 8'd3; wr_data = 16'h1234;
    @(negedge clk);
    check_all();
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int i = 0; i < 32; i++) ref_mem[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

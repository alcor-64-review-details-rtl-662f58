// tb_alcor_spi -- self-checking testbench of the SPI interface. Bit-bangs
// 24-bit SPI words (mode 0, SCK = clk/8) and checks: Pointer write/read, Data
// register write/read through the pixel configuration bus, auto increment for
// writes and reads, the EoC configuration registers (addresses 256..271),
// reads beyond the 272 registers, the SPI status register, the Rad error
// counter and its reset, the EoC status flags and their reset, and that an
// upset in one copy of the TMR pointer is harmless.
module tb_alcor_spi;
  logic clk = 1'b0;
  logic rst_n, sck, cs_n, mosi, miso, cfg_we, seu_evt, seu;
  logic [7:0]  cfg_addr;
  logic [15:0] cfg_wdata, cfg_rdata, status_set, rad_err, eoc_status;
  logic [15:0][15:0] eoc_cfg;
  logic [15:0] pixmem [256];
  int checks = 0, failures = 0;

  alcor_spi dut (.clk(clk), .rst_n(rst_n), .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi),
    .spi_miso(miso), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .cfg_rdata(cfg_rdata), .eoc_cfg(eoc_cfg), .seu_evt(seu_evt), .status_set(status_set),
    .rad_err(rad_err), .eoc_status(eoc_status), .seu(seu));

  always #5 clk = ~clk;

  assign cfg_rdata = pixmem[cfg_addr];
  always @(posedge clk) if (cfg_we) pixmem[cfg_addr] <= cfg_wdata;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [3:0] cmd, input logic [15:0] payload, output logic [15:0] rd);
    logic [23:0] w;
    w = {cmd, 4'h0, payload};
    rd = '0;
    cs_n = 1'b0;
    #40;
    for (int i = 23; i >= 0; i--) begin
      mosi = w[i];
      #40 sck = 1'b1;
      if (i < 16) rd[i] = miso;
      #40 sck = 1'b0;
    end
    #40 cs_n = 1'b1;
    #80;
  endtask

  logic [15:0] r;

  initial begin
    for (int i = 0; i < 256; i++) pixmem[i] = 16'(i * 3);
    rst_n = 1'b0; sck = 1'b0; cs_n = 1'b1; mosi = 1'b0; seu_evt = 1'b0; status_set = '0;
    #22 rst_n = 1'b1;
    #100;
    xfer(4'b0000, 16'h0005, r);
    xfer(4'b1000, 16'h0000, r);
    check(r == 16'h0005, "pointer read back");
    xfer(4'b0001, 16'hABCD, r);
    check(pixmem[5] == 16'hABCD, "data write to pixel register 5");
    xfer(4'b1001, 16'h0000, r);
    check(r == 16'hABCD, "data read");
    xfer(4'b1001, 16'h0000, r);
    check(r == 16'hABCD, "no increment without bit 15");
    // auto increment, writes
    xfer(4'b0000, 16'h800A, r);
    for (int i = 0; i < 8; i++) xfer(4'b0001, 16'h1100 + 16'(i), r);
    for (int i = 0; i < 8; i++) check(pixmem[10 + i] == 16'h1100 + 16'(i), "auto-increment write");
    xfer(4'b1000, 16'h0000, r);
    check(r == 16'h8012, "pointer after 8 writes");
    // auto increment, reads
    xfer(4'b0000, 16'h800A, r);
    for (int i = 0; i < 8; i++) begin
      xfer(4'b1001, 16'h0000, r);
      check(r == 16'h1100 + 16'(i), "auto-increment read");
    end
    // EoC configuration registers
    xfer(4'b0000, 16'd259, r);
    xfer(4'b0001, 16'h5A5A, r);
    check(eoc_cfg[3] == 16'h5A5A, "EoC configuration register 3 written");
    xfer(4'b1001, 16'h0000, r);
    check(r == 16'h5A5A, "EoC configuration register read");
    xfer(4'b0000, 16'd300, r);
    xfer(4'b0001, 16'hFFFF, r);
    xfer(4'b1001, 16'h0000, r);
    check(r == 16'h0000, "address beyond 271 reads 0");
    // SPI status register
    xfer(4'b0010, 16'hC3C3, r);
    xfer(4'b1010, 16'h0000, r);
    check(r == 16'hC3C3, "SPI status register");
    // rad error register
    repeat (5) begin
      @(negedge clk) seu_evt = 1'b1;
      @(negedge clk) seu_evt = 1'b0;
    end
    xfer(4'b1110, 16'h0000, r);
    check(r == 16'd5, "rad error count");
    xfer(4'b0110, 16'h0000, r);
    xfer(4'b1110, 16'h0000, r);
    check(r == 16'd0, "rad error reset");
    // EoC status register
    @(negedge clk) status_set = 16'h0104;
    @(negedge clk) status_set = 16'h0000;
    xfer(4'b1111, 16'h0000, r);
    check(r == 16'h0104, "EoC status flags");
    xfer(4'b0111, 16'h0000, r);
    xfer(4'b1111, 16'h0000, r);
    check(r == 16'h0000, "EoC status reset");
    // upset in the pointer
    xfer(4'b0000, 16'h0007, r);
    @(negedge clk);
    force dut.u_ptr.r2 = 16'h00F0;
    #1 check(seu, "pointer upset flagged");
    release dut.u_ptr.r2;
    xfer(4'b1000, 16'h0000, r);
    check(r == 16'h0007, "pointer survives an upset");
    xfer(4'b1110, 16'h0000, r);
    check(r == 16'd1, "upset counted in rad error register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

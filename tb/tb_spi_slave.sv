// tb_spi_slave: sends random bytes in SPI mode 0 (MSB first) and checks that each
// arrives once on rx_valid/rx_data, that frame_start marks chip-select, and that the
// bytes returned on miso are the status byte presented on tx_data.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  logic sck = 0, cs_n = 1, mosi = 0;
  logic miso, frame_start, rx_valid;
  logic [7:0] rx_data, tx_data;
  int checks = 0, failures = 0;
  int nrx = 0, nframes = 0;
  logic [7:0] rxq [$];

  spi_slave dut (.clk(clk), .rst_n(rst_n), .sck(sck), .cs_n(cs_n), .mosi(mosi),
                 .miso(miso), .tx_data(tx_data), .frame_start(frame_start),
                 .rx_valid(rx_valid), .rx_data(rx_data));

  always #10 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && rx_valid) rxq.push_back(rx_data);
    if (rst_n && frame_start) nframes++;
  end

  localparam int HALF = 8;   // sck half period in clk cycles

  task automatic xfer(input logic [7:0] b, output logic [7:0] got);
    for (int i = 7; i >= 0; i--) begin
      mosi = b[i];
      repeat (HALF) @(posedge clk);
      sck = 1;
      got[i] = miso;
      repeat (HALF) @(posedge clk);
      sck = 0;
    end
  endtask

  initial begin
    logic [7:0] b, got, exp;
    tx_data = 8'hA5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      exp  = tx_data;
      cs_n = 0;
      repeat (HALF) @(posedge clk);
      for (int k = 0; k < 5; k++) begin
        b = 8'($urandom);
        xfer(b, got);
        repeat (6) @(posedge clk);
        checks++;
        if (rxq.size() != 1 || rxq[0] !== b) begin
          failures++;
          $display("FAIL frame %0d byte %0d: sent %h, got %0d bytes", f, k, b,
                   rxq.size());
        end
        rxq.delete();
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL miso returned %h, status %h", got, exp);
        end
        exp     = tx_data;   // loaded at the end of this byte, returned in the next
        tx_data = 8'($urandom);
      end
      cs_n = 1;
      repeat (2 * HALF) @(posedge clk);
    end
    checks++;
    if (nframes != 20) begin
      failures++;
      $display("FAIL frame_start count %0d", nframes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

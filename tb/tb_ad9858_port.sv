// tb_ad9858_port: sends random register-write requests and checks, on the pins, the
// bytes written (address, data, least significant byte first), the update pulse after
// the last byte, bare update pulses, the reset pulse, and the cycle count: four clocks
// per byte and two for the update pulse (the clock that takes the request comes on top).
module tb_ad9858_port;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_fud = 0, reset_req = 0;
  logic [5:0] req_addr = '0;
  logic [31:0] req_data = '0;
  logic [2:0] req_nbytes = '0;
  logic [7:0] d;
  logic [5:0] a;
  logic wr_n, rd_n, fud, rst_o;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic prev_wr = 1, prev_fud = 0;
  logic [13:0] wq [$];   // {addr, data} seen on the pins
  int fud_at [$];        // cycle of each FUD rising edge
  int fud_len = 0, rst_len = 0;

  ad9858_port dut (.clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
                   .req_addr(req_addr), .req_data(req_data), .req_nbytes(req_nbytes),
                   .req_fud(req_fud), .reset_req(reset_req), .dds_d(d), .dds_a(a),
                   .dds_wr_n(wr_n), .dds_rd_n(rd_n), .dds_fud(fud), .dds_reset(rst_o));

  always #10 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (wr_n && !prev_wr) wq.push_back({a, d});
      if (fud && !prev_fud) fud_at.push_back(cyc);
      if (fud) fud_len++;
      if (rst_o) rst_len++;
    end
    prev_wr  = wr_n;
    prev_fud = fud;
  end

  task automatic request(input logic [5:0] ad, input logic [31:0] da, input int n,
                         input logic f);
    int t0, t1;
    @(negedge clk);
    req_valid  = 1;
    req_addr   = ad;
    req_data   = da;
    req_nbytes = 3'(n);
    req_fud    = f;
    while (!req_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!req_ready) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    // bytes
    checks++;
    if (wq.size() != n) begin
      failures++;
      $display("FAIL %0d bytes written, expected %0d", wq.size(), n);
    end else begin
      for (int i = 0; i < n; i++) begin
        checks++;
        if (wq[i] !== {6'(ad + 6'(i)), da[8*i +: 8]}) begin
          failures++;
          $display("FAIL byte %0d: a=%h d=%h, expected a=%h d=%h", i, wq[i][13:8],
                   wq[i][7:0], 6'(ad + 6'(i)), da[8*i +: 8]);
        end
      end
    end
    checks++;
    if (fud_at.size() != ((f) ? 1 : 0) || (f && fud_len != 2)) begin
      failures++;
      $display("FAIL %0d update pulses (%0d clocks) for fud=%b", fud_at.size(), fud_len, f);
    end
    checks++;
    if (n + int'(f) > 0 && (t1 - t0) != 4 * n + 2 * int'(f) + 1) begin
      failures++;
      $display("FAIL request busy %0d clocks, expected %0d", t1 - t0 - 1, 4 * n + 2 * int'(f));
    end
    wq.delete();
    fud_at.delete();
    fud_len = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (!wr_n || !rd_n || fud || rst_o) begin
      failures++;
      $display("FAIL idle pin levels");
    end
    request(6'h0A, 32'h1999_999A, 4, 1'b1);   // FTW0 = 100 MHz, update
    request(6'h08, 32'h0000_007D, 2, 1'b0);   // ramp rate word
    request(6'h00, 32'h0, 0, 1'b1);           // bare update
    for (int i = 0; i < 100; i++)
      request(6'($urandom_range(0, 59)), $urandom, $urandom_range(1, 4), 1'($urandom));
    @(negedge clk);
    reset_req = 1;
    @(negedge clk);
    reset_req = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (rst_len != 4) begin
      failures++;
      $display("FAIL reset pulse %0d clocks", rst_len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

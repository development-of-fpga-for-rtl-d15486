// tb_cmd_parser: feeds five-byte command frames and checks the setting that comes out:
// tuning words for frequency ops (against round(f*2^32/1e9)), the phase op as a
// fraction of a turn (round(p*2^32/36000), p in 0.01 degree), binary values for the
// others, dropped frames for non-BCD digits, and frame realignment on chip-select.
module tb_cmd_parser;
  import cwg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_start = 0, rx_valid = 0;
  logic [7:0] rx_data = '0;
  logic cfg_valid;
  cfg_wr_t cfg;
  logic [7:0] status;
  int checks = 0, failures = 0;
  cfg_wr_t got [$];

  cmd_parser dut (.clk(clk), .rst_n(rst_n), .frame_start(frame_start),
                  .rx_valid(rx_valid), .rx_data(rx_data), .cfg_valid(cfg_valid),
                  .cfg(cfg), .status(status));

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && cfg_valid) got.push_back(cfg);

  function automatic logic [31:0] to_bcd(input int unsigned v);
    logic [31:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [31:0] ftw_of(input longint unsigned f10);
    return 32'(((128'(f10) * 128'd10 << 32) + 128'd500_000_000) / 128'd1_000_000_000);
  endfunction

  function automatic logic [31:0] phase_of(input longint unsigned p);
    return 32'(((128'(p) << 32) + 128'd18_000) / 128'd36_000);
  endfunction

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk);
    rx_valid = 1;
    rx_data  = b;
    @(negedge clk);
    rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_frame(input logic [7:0] cmd, input logic [31:0] bcd);
    @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    send_byte(cmd);
    for (int i = 3; i >= 0; i--) send_byte(bcd[8*i +: 8]);
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_one(input logic [1:0] ch, input op_e op, input logic [31:0] v);
    checks++;
    if (got.size() != 1 || got[0].chan !== ch || got[0].op !== op || got[0].value !== v) begin
      failures++;
      if (got.size() > 0)
        $display("FAIL op %s: got %0d, chan %0d op %0d value %h, expected %h",
                 op.name(), got.size(), got[0].chan, got[0].op, got[0].value, v);
      else $display("FAIL op %s: nothing out", op.name());
    end
    got.delete();
  endtask

  initial begin
    int unsigned f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    got.delete();
    // 45 MHz on channel 1, slot 0 (host screen example)
    send_frame({2'd1, 1'b0, 5'(OP_FREQ0)}, 32'h0450_0000);
    expect_one(2'd1, OP_FREQ0, ftw_of(4_500_000));
    // phase offsets: 90 and 180 degrees are exact quarter and half turns
    send_frame({2'd0, 1'b0, 5'(OP_PHASE)}, 32'h0000_9000);
    expect_one(2'd0, OP_PHASE, 32'h4000_0000);
    send_frame({2'd3, 1'b0, 5'(OP_PHASE)}, 32'h0001_8000);
    expect_one(2'd3, OP_PHASE, 32'h8000_0000);
    for (int i = 0; i < 60; i++) begin
      op_e op;
      logic [1:0] ch;
      f  = $urandom_range(0, 99_999_999);
      op = op_e'($urandom_range(0, int'(OP_PHASE)));
      ch = 2'($urandom);
      send_frame({ch, 1'b0, 5'(op)}, to_bcd(f));
      if (op <= OP_DEV)         expect_one(ch, op, ftw_of(f));
      else if (op == OP_PHASE)  expect_one(ch, op, phase_of(f));
      else                      expect_one(ch, op, f);
    end
    checks++;
    if (status !== 8'd63) begin
      failures++;
      $display("FAIL status %h", status);
    end
    // bad BCD digit: dropped and flagged
    send_frame({2'd0, 1'b0, 5'(OP_FREQ1)}, 32'h1234_5A78);
    checks++;
    if (got.size() != 0 || status[7] !== 1'b1) begin
      failures++;
      $display("FAIL bad digit: %0d out, status %h", got.size(), status);
    end
    got.delete();
    // unknown op code: dropped
    send_frame({2'd0, 1'b0, 5'd31}, 32'h0000_0001);
    send_frame({2'd1, 1'b0, 5'd12}, 32'h0000_0001);
    checks++;
    if (got.size() != 0) begin
      failures++;
      $display("FAIL unknown op accepted");
    end
    got.delete();
    // an aborted frame (two bytes) is discarded by the next chip-select
    @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    send_byte(8'h02);
    send_byte(8'h11);
    send_frame({2'd2, 1'b0, 5'(OP_COUNT)}, 32'h0000_0003);
    expect_one(2'd2, OP_COUNT, 32'd3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

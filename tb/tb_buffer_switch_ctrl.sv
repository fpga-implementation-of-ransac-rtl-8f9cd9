// tb_buffer_switch_ctrl: self-checking test of the double-buffer switching
// controller.
//
// Streams frames of different lengths with random gaps, keeping two model
// buffers written from the controller's write ports, and checks: each point
// goes to the buffer that is not processed, at consecutive addresses from
// 0; the swap happens in the cycle after the last point; the point count
// and frame counter follow; a swap requested while hold is high waits for
// hold to fall with in_ready low meanwhile; a frame longer than DEPTH is cut
// at DEPTH and flagged; the read mux returns the processed buffer's data.
module tb_buffer_switch_ctrl;
  import ransac_pkg::*;

  localparam int unsigned DEPTH  = 16;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W  = $clog2(DEPTH + 1);

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic              in_last = 1'b0;
  point_t            in_point = '0;
  logic              in_ready;
  logic              hold = 1'b0;
  logic [1:0]        wr_en;
  logic [ADDR_W-1:0] wr_addr;
  point_t            wr_data;
  point_t            rd_data0, rd_data1, rd_data;
  logic              bank, overflow, swap_wait;
  logic [CNT_W-1:0]  count;
  logic [7:0]        frame_cnt;

  int checks = 0, failures = 0;
  int n_deferred = 0, n_overflow = 0;

  buffer_switch_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Behavioural buffers written from the write ports, read by a TB address.
  point_t mem0 [DEPTH], mem1 [DEPTH];
  logic [ADDR_W-1:0] rd_addr = '0;
  always_ff @(posedge clk) begin
    if (wr_en[0]) mem0[wr_addr] <= wr_data;
    if (wr_en[1]) mem1[wr_addr] <= wr_data;
    rd_data0 <= mem0[rd_addr];
    rd_data1 <= mem1[rd_addr];
  end

  point_t frame [64];

  function automatic point_t rand_point();
    return '{x1: coord_t'($urandom), y1: coord_t'($urandom),
             x2: coord_t'($urandom), y2: coord_t'($urandom)};
  endfunction

  // Streams n points; with defer set, raises hold before the last point and
  // keeps it up for a while.
  task automatic send_frame(input int n, input bit defer);
    logic b0;
    logic [7:0] f0;
    int kept;
    b0 = bank;
    f0 = frame_cnt;
    kept = (n > DEPTH) ? DEPTH : n;
    for (int i = 0; i < n; i++) frame[i] = rand_point();
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      if (defer && i == n - 1) hold = 1'b1;
      in_valid = 1'b1;
      in_point = frame[i];
      in_last  = (i == n - 1);
      check(in_ready, "ready while streaming");
      if (i < DEPTH) begin
        #1;
        check(wr_en[!bank] && !wr_en[bank] && wr_addr == ADDR_W'(i),
              $sformatf("write point %0d to the filling buffer", i));
      end else begin
        #1;
        check(wr_en == 2'b00, "no write beyond the buffer");
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_last  = 1'b0;
    if (defer) begin
      for (int w = 0; w < 7; w++) begin
        check(bank == b0 && swap_wait && !in_ready, "swap waits while hold");
        in_valid = 1'b1;          // offered, must not be taken
        in_point = rand_point();
        #1;
        check(wr_en == 2'b00, "nothing written while the swap waits");
        @(negedge clk);
      end
      in_valid = 1'b0;
      hold = 1'b0;
      n_deferred++;
      @(negedge clk);
    end else begin
      // swap pending for one cycle after the last point
      check(!in_ready && bank == b0, "swap pending after the last point");
      @(negedge clk);
    end
    check(bank == !b0, "buffers swapped");
    check(frame_cnt == f0 + 8'd1, "frame counter advanced");
    check(count == CNT_W'(kept), $sformatf("count %0d expected %0d", count, kept));
    check(overflow == (n > DEPTH), "overflow flag");
    if (n > DEPTH) n_overflow++;
    check(in_ready, "ready after the swap");
    // the processed buffer now holds the frame
    for (int i = 0; i < kept; i++) begin
      rd_addr = ADDR_W'(i);
      @(negedge clk);
      check(rd_data == frame[i], $sformatf("processed buffer point %0d", i));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(bank == 0 && count == 0 && frame_cnt == 0 && in_ready, "reset state");
    send_frame(5, 0);
    send_frame(16, 0);
    send_frame(9, 1);
    send_frame(1, 0);
    send_frame(23, 0);   // overflow
    send_frame(12, 1);
    send_frame(3, 0);
    check(n_deferred == 2, "deferred swaps exercised");
    check(n_overflow == 1, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

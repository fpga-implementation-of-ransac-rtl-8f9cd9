// tb_point_buffer: self-checking test of one point buffer.
//
// Fills the buffer with random point pairs, reads every address back and
// checks the data and the one-cycle read latency, then overwrites a few
// entries while reading others in the same cycle.
module tb_point_buffer;
  import ransac_pkg::*;

  localparam int unsigned DEPTH  = 128;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic              clk = 1'b0;
  logic              wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0;
  point_t            wr_data = '0;
  logic [ADDR_W-1:0] rd_addr = '0;
  point_t            rd_data;

  point_t model [DEPTH];
  int checks = 0, failures = 0;

  point_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
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

  function automatic point_t rand_point();
    return '{x1: coord_t'($urandom), y1: coord_t'($urandom),
             x2: coord_t'($urandom), y2: coord_t'($urandom)};
  endfunction

  initial begin
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = ADDR_W'(i); wr_data = rand_point();
      model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    // read back, in a scrambled order; data must arrive one cycle later
    for (int i = 0; i < DEPTH; i++) begin
      int a = (i * 37) % DEPTH;
      rd_addr = ADDR_W'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("read %0d", a));
    end
    // latency: data must not change until the clock edge
    rd_addr = 0;
    @(negedge clk);
    rd_addr = 1;
    #1;
    check(rd_data == model[0], "read data held until the clock edge");
    @(negedge clk);
    check(rd_data == model[1], "new data after the edge");
    // simultaneous write and read of different addresses
    for (int i = 0; i < 20; i++) begin
      int wa = $urandom_range(DEPTH - 1);
      int ra = (wa + 1 + $urandom_range(DEPTH - 2)) % DEPTH;
      wr_en = 1'b1; wr_addr = ADDR_W'(wa); wr_data = rand_point();
      rd_addr = ADDR_W'(ra);
      @(negedge clk);
      model[wa] = wr_data;
      check(rd_data == model[ra], "read beside a write");
    end
    wr_en = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = ADDR_W'(i);
      @(negedge clk);
      check(rd_data == model[i], $sformatf("final read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

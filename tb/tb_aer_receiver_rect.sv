// tb_aer_receiver_rect: the end-to-end test of tb_aer_receiver run on a
// non-square array (8 rows of 32 cells, B = 5 set by the column count), to
// check that rows and columns of different address widths share the bus.
//
// A transmitter model sends bursts on the three-wire link exactly as the
// link protocol prescribes: row address with ry high, then for each active
// cell a column address with rx_n pulsed low, each step answered by ack, and
// ry low to end the burst. Every array cell has a recipient model that
// acknowledges its event request after a random delay (sometimes long).
//
// Checks: the events of each burst appear, all in one cycle, at exactly the
// burst's row and columns, in the order the bursts were sent, and no other
// request ever rises; every burst is delivered.
// Mechanisms counted (each must occur at least once):
//   parallel   a write delivering two or more events at once
//   pipelined  a column address decoded while the previous row is being
//              written
//   early_row  a row address accepted while the previous write is running
//   held       an event waiting in a column buffer because its data latch
//              is blocked by a write in progress
//   backpress  a burst's end held unacknowledged because the row decoder is
//              still busy with the previous write
module tb_aer_receiver_rect;
  localparam int NROWS = 8, NCOLS = 32, B = 5, NBURST = 300;

  logic clk = 0, rst = 1, ry, rx_n, ack;
  logic [B-1:0] addr;
  logic [NROWS-1:0][NCOLS-1:0] ev_req, ev_ack, prev_req;
  int checks = 0, failures = 0, delivered = 0;
  int n_parallel = 0, n_pipelined = 0, n_early_row = 0, n_held = 0, n_back = 0;

  typedef struct {
    int unsigned      row;
    logic [NCOLS-1:0] cols;
  } burst_t;
  burst_t sent_q[$];

  aer_receiver #(.NROWS(NROWS), .NCOLS(NCOLS), .B(B)) dut (.clk, .rst, .ry, .rx_n, .addr, .ack, .ev_req, .ev_ack);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d bursts delivered", delivered, NBURST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- recipients ----------------
  int unsigned slow;   // recipients answer with probability (16-slow)/16 per cycle
  always @(posedge clk) begin
    if (rst) ev_ack <= '0;
    else for (int r = 0; r < NROWS; r++) for (int c = 0; c < NCOLS; c++) begin
      if (ev_req[r][c] != ev_ack[r][c]) begin
        if (($urandom % 16) >= slow) ev_ack[r][c] <= ev_req[r][c];
      end
    end
  end

  // ---------------- delivery check ----------------
  always @(negedge clk) begin
    if (rst) prev_req <= '0;
    else begin
      logic [NROWS-1:0][NCOLS-1:0] rise;
      rise = ev_req & ~prev_req;
      prev_req <= ev_req;
      if (rise != '0) begin
        burst_t want;
        logic [NROWS-1:0][NCOLS-1:0] exp_rise;
        chk(sent_q.size() > 0, "event only after a burst was sent");
        if (sent_q.size() > 0) begin
          want = sent_q.pop_front();
          exp_rise = '0;
          exp_rise[want.row] = want.cols;
          chk(rise == exp_rise, "burst written whole, in its row, in order");
          if (rise != exp_rise) $display("  want row %0d cols %h", want.row, want.cols);
          if ($countones(want.cols) >= 2) n_parallel++;
          delivered++;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  logic [NCOLS-1:0] buf_req, lat_ack;
  for (genvar k = 0; k < NCOLS; k++) begin : g_probe
    assign buf_req[k] = dut.u_lth.g_cell[k].q;
    assign lat_ack[k] = dut.u_lth.g_cell[k].b;
  end
  logic prev_go, prev_col_any;
  int   back_cnt;
  always @(posedge clk) begin
    if (rst) begin
      prev_go <= 0; prev_col_any <= 0;
      back_cnt <= 0;
    end else begin
      prev_go      <= dut.u_dmx.g_ack;
      prev_col_any <= |dut.col_sel;
      if ((|dut.col_sel) && !prev_col_any && dut.row_eo) n_pipelined++;
      if (dut.u_dmx.g_ack && !prev_go && dut.row_eo) n_early_row++;
      if (dut.row_eo && |(buf_req & ~lat_ack)) n_held++;
      if (!ry && ack && dut.row_eo) begin
        back_cnt <= back_cnt + 1;
        if (back_cnt == 2) n_back++;
      end else back_cnt <= 0;
    end
  end

  // ---------------- transmitter ----------------
  task automatic wait_ack(input logic v);
    while (ack != v) @(posedge clk);
    #1;
    repeat ($urandom % 2) @(posedge clk);
    #1;
  endtask

  initial begin
    burst_t b, last;
    ry = 0; rx_n = 1; addr = 0; slow = 1;
    last.row = 0; last.cols = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < NBURST; i++) begin
      // bursts alternate between sparse, dense and repeats of the last one
      slow = (i % 50 < 25) ? 0 : 15;
      b.row = $urandom % NROWS;
      case ($urandom % 4)
        0: b.cols = NCOLS'(1) << ($urandom % NCOLS);
        1: b.cols = NCOLS'({$urandom, $urandom});
        2: b.cols = last.cols;
        default: begin
          b.cols = '0;
          repeat (1 + $urandom % 4) b.cols[$urandom % NCOLS] = 1'b1;
        end
      endcase
      if (b.cols == '0) b.cols[0] = 1'b1;
      sent_q.push_back(b);
      last = b;
      addr = B'(b.row);
      @(posedge clk); #1 ry = 1;
      wait_ack(1);
      for (int c = 0; c < NCOLS; c++) if (b.cols[c]) begin
        addr = B'(c);
        @(posedge clk); #1 rx_n = 0;
        wait_ack(0);
        rx_n = 1; addr = B'(b.row);
        wait_ack(1);
      end
      ry = 0;
      wait_ack(0);
    end
    while (delivered < NBURST) @(posedge clk);
    repeat (50) @(posedge clk);
    #1;
    chk(delivered == NBURST, "every burst delivered");
    chk(ev_req == '0, "array idle at the end");
    chk(n_parallel  > 0, "parallel write happened");
    chk(n_pipelined > 0, "column decoding overlapped a write");
    chk(n_early_row > 0, "row accepted during a write");
    chk(n_held      > 0, "event held in a column buffer");
    chk(n_back     > 0, "burst end held by a busy row decoder");
    $display("mechanisms: parallel=%0d pipelined=%0d early_row=%0d held=%0d backpress=%0d",
             n_parallel, n_pipelined, n_early_row, n_held, n_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

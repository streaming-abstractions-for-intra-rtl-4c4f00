// tb_enso_notif_buffer: self-checking test of the RX notification ring writer.
//
// A 4-record ring (3 usable slots). Notifications are offered back to back; the test
// checks each record's address (base + slot * 64) and content, that the writer stops
// when the ring is full and counts the stalled cycles, that a head write from software
// frees slots, that slots wrap, and that a record leaves each cycle when the ring has
// room and the DMA port is ready.
`timescale 1ns/1ps
module tb_enso_notif_buffer;
  import enso_pkg::*;
  localparam int RL = 2;
  localparam logic [ADDR_W-1:0] BASE = 64'h0000_0002_0000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic base_wr_valid = 0, head_wr_valid = 0;
  logic [ADDR_W-1:0] base_wr_addr = 0;
  logic [PTR_W-1:0] head_wr_value = 0;
  logic notif_valid = 0, notif_ready;
  rx_notif_t notif = '0;
  logic dma_valid, dma_ready = 1;
  dma_wr_t dma;
  logic full;
  logic [31:0] full_cycles;

  enso_notif_buffer #(.RING_LOG2(RL)) dut (.*);

  int checks = 0, failures = 0;
  int slot = 0, n_written = 0, head = 0;
  rx_notif_t sent_q [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    #2;
    if (rst_n && dma_valid && dma_ready) begin
      rx_notif_t e;
      e = sent_q.pop_front();
      check(dma.addr == BASE + 64'(slot) * 64, $sformatf("record address %h", dma.addr));
      check(dma.data == DATA_W'(e), "record content");
      slot = (slot + 1) % (1 << RL);
      n_written++;
    end
  end

  // offer n notifications; returns the cycles they took
  task automatic offer(int n, output int cycles);
    int t0;
    t0 = $time;
    for (int i = 0; i < n; i++) begin
      rx_notif_t r;
      r = '{signal: 1'b1, pipe: PIPE_ID_W'($urandom_range(0, 100)), tail: $urandom()};
      @(negedge clk);
      notif_valid <= 1; notif <= r;
      sent_q.push_back(r);
      #1;
      while (!notif_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    cycles = ($time - t0) / 10;
    @(negedge clk) notif_valid <= 0;
  endtask

  task automatic sw_head(int h);
    @(negedge clk);
    head_wr_valid <= 1; head_wr_value <= PTR_W'(h);
    @(negedge clk) head_wr_valid <= 0;
    head = h;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    base_wr_valid <= 1; base_wr_addr <= BASE;
    @(negedge clk) base_wr_valid <= 0;

    offer(3, c);                               // fills the three usable slots
    check(c == 3, $sformatf("3 records in %0d cycles", c));
    @(negedge clk); #1;
    check(full, "ring full after three records");
    // a fourth record must wait for software
    fork
      offer(1, c);
      begin
        repeat (6) @(negedge clk);
        check(n_written == 3, "nothing written while full");
        sw_head(2);                            // software consumed two records
      end
    join
    check(full_cycles >= 5, $sformatf("full stall cycles %0d", full_cycles));
    check(n_written == 4, "fourth record written after head update");
    // two more fit, wrapping round
    offer(1, c);
    repeat (3) @(negedge clk);
    check(n_written == 5 && full, "wrap and full again");
    // random: software drains in bursts, DMA back-pressure
    for (int k = 0; k < 50; k++) begin
      fork
        offer($urandom_range(1, 3), c);
        begin
          repeat ($urandom_range(1, 4)) @(negedge clk);
          sw_head(slot);
        end
      join
      @(negedge clk) dma_ready <= ($urandom_range(0, 3) != 0);
      @(negedge clk) dma_ready <= 1;
      sw_head(slot);
    end
    repeat (5) @(negedge clk);
    check(sent_q.size() == 0, "all records written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_enso_nic: end-to-end test of the Enso NIC host interface with a host model.
//
// Four pipes of 64 flits, an 8-record notification ring, a 4-record TX ring and
// notification prefetching enabled. A network source sends numbered messages of 1-8
// flits to random pipes; enso_host_model plays memory and software and checks every
// received flit and every transmitted one. Phases: light load with fast software, heavy
// load with slow software and DMA back-pressure (pipes overflow and drop whole messages,
// the notification ring fills), and TX traffic throughout. At the end every message is
// either received intact or counted as dropped, notifications were coalesced (fewer
// notifications than messages), and prefetch requests, drops, a full notification ring
// and TX completions all happened.
`timescale 1ns/1ps
module tb_enso_nic;
  import enso_pkg::*;
  localparam int NP = 4, PRL = 6, NRL = 3, TRL = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mmio_wr_valid;
  logic [19:0] mmio_addr;
  logic [63:0] mmio_data;
  logic rx_valid = 0, rx_ready, rx_sop = 0, rx_eop = 0;
  logic [PIPE_ID_W-1:0] rx_pipe = 0;
  logic [LEN_W-1:0] rx_len = 0;
  logic [DATA_W-1:0] rx_data = '0;
  logic dma_wr_valid, dma_wr_ready;
  dma_wr_t dma_wr;
  logic dma_rd_req_valid, dma_rd_req_ready;
  dma_rd_req_t dma_rd_req;
  logic dma_rd_cpl_valid, dma_rd_cpl_ready;
  logic [DATA_W-1:0] dma_rd_cpl_data;
  logic tx_valid, tx_ready, tx_sop, tx_eop;
  logic [DATA_W-1:0] tx_data;
  logic [31:0] rx_accept_count, rx_drop_count, notif_count, prefetch_count,
               notif_full_cycles, tx_sent_count;

  enso_nic #(.NUM_PIPES(NP), .PIPE_RING_LOG2(PRL), .NOTIF_RING_LOG2(NRL),
             .TX_RING_LOG2(TRL), .PREFETCH_EN(1'b1)) dut (.*);

  enso_host_model #(.NUM_PIPES(NP), .PIPE_RING_LOG2(PRL), .NOTIF_RING_LOG2(NRL),
                    .TX_RING_LOG2(TRL), .USE_PREFETCH(1'b1)) host (.*);

  int checks = 0, failures = 0;
  int sent = 0, msg_no [NP];
  bit net_on = 0;
  int gap = 4;
  // current message being sent
  int cur_p = 0, cur_m = 0, cur_i = 0, cur_len = 0;
  bit busy = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // network source
  always @(posedge clk) begin
    if (rst_n) begin
      bit adv;
      adv = !rx_valid || rx_ready;
      if (adv) begin
        if (busy && cur_i < cur_len) begin
          rx_valid <= 1; rx_pipe <= PIPE_ID_W'(cur_p); rx_sop <= (cur_i == 0);
          rx_eop <= (cur_i == cur_len - 1); rx_len <= LEN_W'(cur_len);
          rx_data <= host.make_flit(cur_p, cur_m, cur_i, cur_len);
          cur_i++;
          if (cur_i == cur_len) busy = 0;
        end else if (net_on && $urandom_range(0, gap) == 0) begin
          cur_p = $urandom_range(0, NP - 1);
          cur_m = msg_no[cur_p]++;
          cur_len = $urandom_range(1, 8);
          cur_i = 1;
          busy = (cur_len > 1);
          sent++;
          rx_valid <= 1; rx_pipe <= PIPE_ID_W'(cur_p); rx_sop <= 1;
          rx_eop <= (cur_len == 1); rx_len <= LEN_W'(cur_len);
          rx_data <= host.make_flit(cur_p, cur_m, 0, cur_len);
        end else rx_valid <= 0;
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) msg_no[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    // phase 1: light load, fast software
    net_on = 1; gap = 12;
    repeat (2000) @(posedge clk);
    check(rx_drop_count == 0, "no drops at light load");
    host.queue_tx(3);
    host.queue_tx(1);
    // phase 2: heavy load, slow software, back-pressure
    gap = 1; host.slow = 40; host.bp_en = 1;
    for (int k = 0; k < 20; k++) begin
      repeat (300) @(posedge clk);
      if (host.tx_queued - host.tx_done < 3) host.queue_tx($urandom_range(0, 6));
    end
    // drain
    net_on = 0;
    wait (!busy);
    host.slow = 0; host.bp_en = 0;
    repeat (3000) @(posedge clk);
    check(host.rx_msgs + int'(rx_drop_count) == sent,
          $sformatf("received %0d + dropped %0d == sent %0d", host.rx_msgs, rx_drop_count, sent));
    check(int'(rx_accept_count) == host.rx_msgs, "accepted == received");
    check(rx_drop_count > 0, $sformatf("pipe overflow drops: %0d", rx_drop_count));
    check(int'(notif_count) < host.rx_msgs,
          $sformatf("coalescing: %0d notifications for %0d messages", notif_count, host.rx_msgs));
    check(prefetch_count > 0 && int'(prefetch_count) == host.prefetch_sent, "prefetch requests");
    check(notif_full_cycles > 0, $sformatf("notification ring full for %0d cycles", notif_full_cycles));
    check(host.tx_done == host.tx_queued && host.tx_done > 5, $sformatf("TX completions %0d", host.tx_done));
    check(host.exp_tx.size() == 0, "all TX flits sent");
    $display("mechanisms: drops=%0d notifications=%0d messages=%0d prefetch=%0d notif_full_cycles=%0d tx=%0d",
             rx_drop_count, notif_count, host.rx_msgs, prefetch_count, notif_full_cycles, host.tx_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule

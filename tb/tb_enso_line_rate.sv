// tb_enso_line_rate: receive side of the Enso NIC at 100 Gb/s line rate.
//
// Workload: minimum-size (64-byte, one flit) packets at 148.8 Mpps, the rate of a
// 100 Gb/s Ethernet link, into a NIC clocked at 250 MHz: 0.595 packets per cycle,
// offered here as 3 packets every 5 cycles (0.6). The packets are spread round robin
// over 8 pipes, one per core of an 8-core receiver. The NIC has every parameter at
// its default (16 pipes of 2**15 flits, no prefetching); enso_host_model plays memory,
// accepting every DMA write at once, and software, which polls notifications, checks
// each packet and returns the space by writing Head_SW. Software pauses a random 0-380
// cycles between notifications: about one PCIe round trip (2 x 379 ns) at 250 MHz, the
// time before a Head_SW write can take effect. Without that delay each packet would get
// its own notification, and data plus notifications (1.2 writes per cycle) would exceed
// the one DMA write per cycle.
//
// Checks: nothing is dropped, every packet arrives intact, notifications are coalesced
// (fewer notifications than packets), a packet is refused only in a cycle the shared DMA
// write port gave to a notification (refusals <= notifications), and the burst is
// accepted at no less than 148.8 Mpps (at most 250/148.8 cycles per packet).
`timescale 1ns/1ps
module tb_enso_line_rate;
  import enso_pkg::*;
  localparam int NP = 16, PRL = 15, NRL = 10, TRL = 10;
  localparam int CORES = 8, PKTS = 3000;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;    // 4 ns period: 250 MHz

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

  enso_nic dut (.*);

  enso_host_model #(.NUM_PIPES(NP), .PIPE_RING_LOG2(PRL), .NOTIF_RING_LOG2(NRL),
                    .TX_RING_LOG2(TRL), .USE_PREFETCH(1'b0)) host (.*);

  int checks = 0, failures = 0;
  int sent = 0, refused = 0, slot = 0, msg_no [CORES];
  longint first_cyc = -1, last_cyc = 0, cyc = 0;
  bit net_on = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // network source: 3 one-flit packets in every 5 cycles
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (rx_valid && !rx_ready) refused++;
      if (rx_valid && rx_ready && first_cyc < 0) first_cyc = cyc;
      if (rx_valid && rx_ready) last_cyc = cyc;
      if (!rx_valid || rx_ready) begin
        if (net_on && sent < PKTS && (slot % 5) < 3) begin
          int p, m;
          p = sent % CORES;
          m = msg_no[p]++;
          sent++;
          rx_valid <= 1; rx_pipe <= PIPE_ID_W'(p); rx_sop <= 1; rx_eop <= 1;
          rx_len <= LEN_W'(1); rx_data <= host.make_flit(p, m, 0, 1);
        end else rx_valid <= 0;
        if (net_on) slot++;
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < CORES; p++) msg_no[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    host.slow = 380;
    net_on = 1;
    wait (sent == PKTS);
    repeat (4000) @(posedge clk);
    check(refused <= int'(notif_count),
          $sformatf("cycles with a packet refused: %0d, notifications %0d", refused, notif_count));
    check(rx_drop_count == 0, $sformatf("drops: %0d", rx_drop_count));
    check(host.rx_msgs == PKTS, $sformatf("received %0d of %0d", host.rx_msgs, PKTS));
    // offered: 3 per 5 cycles, last accepted 5*PKTS/3 - 3 cycles after the first;
    // every refused cycle delays the rest by one
    check(last_cyc - first_cyc == longint'(5 * PKTS / 3 - 3 + refused),
          $sformatf("burst accepted over %0d cycles", last_cyc - first_cyc));
    // 148.8 Mpps at 250 MHz: PKTS packets in at most PKTS * 250 / 148.8 cycles
    check((last_cyc - first_cyc + 1) * 1488 <= longint'(PKTS) * 2500,
          $sformatf("rate %0d kpps at 250 MHz", longint'(PKTS) * 250000 / (last_cyc - first_cyc + 1)));
    check(int'(notif_count) < PKTS,
          $sformatf("coalescing: %0d notifications for %0d packets", notif_count, PKTS));
    $display("line rate: %0d packets in %0d cycles, %0d refused cycles, %0d notifications",
             PKTS, last_cyc - first_cyc + 1, refused, notif_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule

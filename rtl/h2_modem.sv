// h2_modem -- HIPERLAN/2 baseband modem with its programmable interface unit.
//
// The processor (AMBA APB port) loads a command program, configuration and transmit
// payload into the interface unit (modem_if), which then drives, slot by slot, the
// transmit path (tx_path: scrambling, convolutional coding, puncturing, interleaving,
// mapping, pilots and training, IFFT, cyclic prefix) and the receive path (rx_path:
// cyclic prefix removal, FFT, channel estimation, equalisation, demapping,
// deinterleaving, Viterbi decoding, descrambling). rx_sync finds the preamble during
// a BCH search and re-times the slot counter; its autocorrelation gives cfo_corr the
// frequency offset, which is then removed from every received sample (one clock of
// latency) before the receive path.
// Samples: one IQ sample per CLKS_PER_SAMPLE clocks (20 MS/s at 100 MHz). tx_valid
// marks the samples of a transmit burst. Received samples count only while the RF
// interface is switched on for reception (IQ_EN command) and rx_valid is high; the
// receive path takes the first valid sample after a receive command as the start of
// the burst. Interrupts: [0] synchronisation, [1] end of receive, [2] end of transmit.
module h2_modem
  import h2_pkg::*;
#(
  parameter int CLKS_PER_SAMPLE = 5,
  parameter int CLKS_PER_SLOT   = 40,
  parameter int SLOTS_PER_FRAME = 5000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 psel,
  input  logic                 penable,
  input  logic                 pwrite,
  input  logic [15:0]          paddr,
  input  logic [31:0]          pwdata,
  output logic [31:0]          prdata,
  output logic                 pready,
  output logic                 pslverr,
  output logic [2:0]           irq,
  output logic                 iq_en,
  output logic signed [SW-1:0] tx_i,
  output logic signed [SW-1:0] tx_q,
  output logic                 tx_valid,
  input  logic signed [SW-1:0] rx_i,
  input  logic signed [SW-1:0] rx_q,
  input  logic                 rx_valid,
  output logic                 rx_ovf
);
  logic [$clog2(CLKS_PER_SAMPLE)-1:0] div;
  logic        smp_en;
  logic        tx_start, tx_flush, tx_busy, tx_done;
  logic        rx_start, rx_flush, rx_busy, rx_done;
  burst_t      tx_burst, rx_burst;
  logic [7:0]  tx_byte, rx_byte;
  logic        tx_byte_valid, tx_byte_ready, rx_byte_valid;
  logic        search, found;
  logic [39:0] sync_thr;
  logic [12:0] slot;
  logic        rxv;
  logic signed [39:0]   sync_ci, sync_cq;
  logic signed [SW-1:0] cor_i, cor_q;
  logic                 cor_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              div <= '0;
    else if (div == CLKS_PER_SAMPLE - 1)     div <= '0;
    else                                     div <= div + 1'b1;
  end
  assign smp_en = (div == CLKS_PER_SAMPLE - 1);
  assign rxv    = rx_valid && iq_en;

  modem_if #(.CLKS_PER_SLOT(CLKS_PER_SLOT), .SLOTS_PER_FRAME(SLOTS_PER_FRAME)) u_if (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .irq, .iq_en, .tx_start, .tx_burst, .tx_flush, .tx_busy, .tx_done, .tx_byte,
    .tx_byte_valid, .tx_byte_ready, .rx_start, .rx_burst, .rx_flush, .rx_busy, .rx_done,
    .rx_byte, .rx_byte_valid, .search, .found, .sync_thr, .slot);

  tx_path u_tx (.clk, .rst_n, .smp_en, .start(tx_start), .burst(tx_burst), .flush(tx_flush),
    .busy(tx_busy), .done(tx_done), .byte_in(tx_byte), .byte_valid(tx_byte_valid),
    .byte_ready(tx_byte_ready), .iq_i(tx_i), .iq_q(tx_q), .iq_valid(tx_valid));

  // frequency offset estimate taken at the preamble, correction of every later sample
  cfo_corr u_cfo (.clk, .rst_n, .tick(smp_en), .est_valid(found), .est_i(sync_ci), .est_q(sync_cq),
    .rx_i, .rx_q, .rx_valid(rxv), .y_i(cor_i), .y_q(cor_q), .y_valid(cor_v), .step(),
    .est_busy());

  rx_path u_rx (.clk, .rst_n, .start(rx_start), .burst(rx_burst), .flush(rx_flush),
    .busy(rx_busy), .done(rx_done), .rx_i(cor_i), .rx_q(cor_q), .rx_valid(cor_v), .byte_out(rx_byte),
    .byte_valid(rx_byte_valid), .ovf(rx_ovf));

  rx_sync u_sync (.clk, .rst_n, .en(search), .thr(sync_thr), .rx_i, .rx_q, .rx_valid(rxv),
    .found, .corr_i(sync_ci), .corr_q(sync_cq));
endmodule

// addr_gen -- memory address generator of the modem interface unit.
//
// Transmit side: for each transmit burst it reads `tx_nbytes` payload bytes from the
// transmit memory (32-bit words, byte 0 in bits 7:0) starting at the transmit
// pointer and hands them to the transmit path as a valid/ready byte stream. The word
// for the next byte is fetched while the current one is consumed (one-clock read
// latency of the memory).
// Receive side: bytes from the receive path are packed into words and written to the
// receive memory at the receive pointer; every received byte rewrites its word, so a
// burst that ends mid-word needs no extra flush.
// Both pointers advance burst by burst, each burst starting on a word boundary, and
// return to 0 on `ptr_reset` (RESET command). The block's role follows the design;
// the addressing scheme is this design's choice.
module addr_gen #(
  parameter int TAW = 10,
  parameter int RAW = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ptr_reset,
  // transmit
  input  logic           tx_start,
  input  logic [12:0]    tx_nbytes,
  output logic           txm_en,
  output logic [TAW-1:0] txm_addr,
  input  logic [31:0]    txm_rdata,
  output logic [7:0]     tx_byte,
  output logic           tx_byte_valid,
  input  logic           tx_byte_ready,
  // receive
  input  logic           rx_start,
  input  logic [7:0]     rx_byte,
  input  logic           rx_byte_valid,
  output logic           rxm_we,
  output logic [RAW-1:0] rxm_addr,
  output logic [31:0]    rxm_wdata
);
  // transmit: byte pointer (absolute), bytes left, word-valid bookkeeping
  logic [TAW+1:0] tptr;
  logic [12:0]    tleft;
  logic           wvalid, fetching;
  logic [31:0]    word;

  assign txm_addr      = tptr[TAW+1:2];
  assign txm_en        = (tleft != 0) && !wvalid && !fetching;
  assign tx_byte       = word[8*tptr[1:0] +: 8];
  assign tx_byte_valid = (tleft != 0) && wvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tptr <= '0; tleft <= '0; wvalid <= 1'b0; fetching <= 1'b0; word <= '0;
    end else if (ptr_reset) begin
      tptr <= '0; tleft <= '0; wvalid <= 1'b0; fetching <= 1'b0;
    end else begin
      if (tx_start) begin
        // round the pointer up to a word boundary
        if (tptr[1:0] != 2'b00) tptr <= {tptr[TAW+1:2] + 1'b1, 2'b00};
        tleft <= tx_nbytes; wvalid <= 1'b0; fetching <= 1'b0;
      end else begin
        fetching <= txm_en;
        if (fetching) begin word <= txm_rdata; wvalid <= 1'b1; end
        if (tx_byte_valid && tx_byte_ready) begin
          tptr  <= tptr + 1'b1;
          tleft <= tleft - 1'b1;
          if (tptr[1:0] == 2'b11) wvalid <= 1'b0;
        end
      end
    end
  end

  // receive
  logic [RAW+1:0] rptr;
  logic [31:0]    rword;
  logic [31:0]    rnext;

  always_comb begin
    rnext = (rptr[1:0] == 2'b00) ? 32'd0 : rword;
    rnext[8*rptr[1:0] +: 8] = rx_byte;
  end

  assign rxm_we    = rx_byte_valid;
  assign rxm_addr  = rptr[RAW+1:2];
  assign rxm_wdata = rnext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0; rword <= '0;
    end else if (ptr_reset) begin
      rptr <= '0; rword <= '0;
    end else if (rx_start) begin
      if (rptr[1:0] != 2'b00) rptr <= {rptr[RAW+1:2] + 1'b1, 2'b00};
    end else if (rx_byte_valid) begin
      rword <= rnext;
      rptr  <= rptr + 1'b1;
    end
  end
endmodule

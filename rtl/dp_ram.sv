// dp_ram -- dual-port memory used for the modem interface unit's buffers.
//
// The command, configuration, transmit-data and receive-data memories are all
// instances of this block: port A belongs to the bus interface (ARM side), port B to
// the modem (command translator, address generator). Both ports are synchronous with
// one clock of read latency; a write and a read of the same word on different ports
// in the same clock return the old contents. Sizes are set by the instantiating
// module; the design names the buffers but gives no sizes.
module dp_ram #(
  parameter int DEPTH = 64,
  parameter int W     = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule

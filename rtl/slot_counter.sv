// slot_counter -- time base of the modem interface unit.
//
// Counts time slots of CLKS_PER_SLOT clocks (400 ns: 40 clocks at 100 MHz) from 0 to
// SLOTS_PER_FRAME-1 (5000 slots = one 2 ms MAC frame) and then wraps, counting frames
// in a 4-bit frame counter. `load` sets the slot number (RESET command, or the slot
// number after synchronisation when the preamble search succeeds); `frame_load` sets
// the frame counter (configuration). Every command waits for its slot number here.
// The counter's role follows the design; the slot length is HIPERLAN/2's.
module slot_counter #(
  parameter int CLKS_PER_SLOT   = 40,
  parameter int SLOTS_PER_FRAME = 5000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [12:0] load_val,
  input  logic        frame_load,
  input  logic [3:0]  frame_val,
  output logic [12:0] slot,
  output logic [3:0]  frame,
  output logic        slot_tick
);
  logic [$clog2(CLKS_PER_SLOT)-1:0] div;

  assign slot_tick = (div == CLKS_PER_SLOT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; slot <= '0; frame <= '0;
    end else begin
      if (load) begin
        div  <= '0;
        slot <= load_val;
      end else if (slot_tick) begin
        div <= '0;
        if (slot == 13'(SLOTS_PER_FRAME - 1)) begin
          slot  <= '0;
          frame <= frame + 1'b1;
        end else begin
          slot <= slot + 1'b1;
        end
      end else begin
        div <= div + 1'b1;
      end
      if (frame_load) frame <= frame_val;
    end
  end
endmodule

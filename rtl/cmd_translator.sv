// cmd_translator -- command translator of the modem interface unit.
//
// Executes the modem program held in the command memory: it fetches command word
// `pc` (one clock read latency), waits until the slot counter reaches the command's
// time slot, waits if the addressed path is still busy, and then acts:
//   Tx / Tx_S / Tx_L : start the transmit path   Rx / Rx_S / Rx_L : arm the receive path
//   IQ_EN : switch the RF interface               END : flush transmit and/or receive path
//   RESET : reset memory pointers, set the synchronisation parameters
//   BCH_SRCH : search for a preamble (no time slot; continues when found)
//   CFG : copy the configuration memory into the configuration registers
//   NOP : nothing.
// A burst description is built from the command: bytes = packets x packet size, the
// preamble is none without P1, long for Tx_L/Rx_L and for the broadcast (BCH) packet,
// short otherwise. The program runs from word 0 for `ncmd` commands while `run` is
// high, then stops (`halted`). The command set follows the design; the word format,
// the preamble rule and the run/halt control are this design's choices.
module cmd_translator
  import h2_pkg::*;
#(
  parameter int CAW = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic [CAW:0]   ncmd,
  output logic           cm_en,
  output logic [CAW-1:0] cm_addr,
  input  logic [31:0]    cm_rdata,
  input  logic [12:0]    slot,
  input  logic           tx_busy,
  input  logic           rx_busy,
  output logic           tx_start,
  output logic           rx_start,
  output burst_t         burst,      // valid with tx_start / rx_start (seed left 0)
  output logic           iq_en,
  output logic           flush_tx,
  output logic           flush_rx,
  output logic           ptr_reset,
  output logic           slot_set_en,
  output logic [12:0]    sync_slot,
  output logic [1:0]     sync_frames,
  output logic           search,
  input  logic           found,
  output logic           cfg_load,
  output logic           halted,
  output logic [CAW:0]   pc,
  output op_e            cur_op
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_WAIT_SLOT, S_WAIT_PATH, S_SEARCH,
                            S_DONE} st_e;
  st_e  st;
  cmd_t cmd;

  assign cm_addr = CAW'(pc);
  assign cm_en   = (st == S_FETCH);
  assign search  = (st == S_SEARCH);
  assign cur_op  = cmd.op;

  always_comb begin
    burst        = '0;
    burst.mode   = cmd.mode;
    burst.nbytes = 13'(32'(cmd.npkt) * pkt_bytes(cmd.ptype));
    if (!cmd.p1)                                                   burst.pre = PRE_NONE;
    else if (cmd.op == OP_TX_L || cmd.op == OP_RX_L || cmd.ptype == PT_BCH) burst.pre = PRE_LONG;
    else                                                           burst.pre = PRE_SHORT;
  end

  function automatic logic is_tx(op_e o);
    return o == OP_TX || o == OP_TX_S || o == OP_TX_L;
  endfunction
  function automatic logic is_rx(op_e o);
    return o == OP_RX || o == OP_RX_S || o == OP_RX_L;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cmd <= '0; pc <= '0; iq_en <= 1'b0; sync_slot <= '0; sync_frames <= '0;
      {tx_start, rx_start, flush_tx, flush_rx, ptr_reset, slot_set_en, cfg_load} <= '0;
      halted <= 1'b0;
    end else begin
      {tx_start, rx_start, flush_tx, flush_rx, ptr_reset, slot_set_en, cfg_load} <= '0;
      case (st)
        S_IDLE: if (run) begin pc <= '0; halted <= 1'b0; st <= S_FETCH; end
        S_FETCH: st <= S_DECODE;
        S_DECODE: begin
          cmd <= cmd_t'(cm_rdata);
          st  <= (op_e'(cm_rdata[31:28]) == OP_BCH_SRCH) ? S_SEARCH : S_WAIT_SLOT;
        end
        S_WAIT_SLOT: if (slot == cmd.slot) st <= S_WAIT_PATH;
        S_WAIT_PATH: begin
          if (!((is_tx(cmd.op) && tx_busy) || (is_rx(cmd.op) && rx_busy))) begin
            case (cmd.op)
              OP_TX, OP_TX_S, OP_TX_L: tx_start <= 1'b1;
              OP_RX, OP_RX_S, OP_RX_L: rx_start <= 1'b1;
              OP_IQ_EN: iq_en <= cmd.arg[0];
              OP_END: begin flush_tx <= cmd.arg[0]; flush_rx <= cmd.arg[1]; end
              OP_RESET: begin
                ptr_reset   <= 1'b1;
                sync_frames <= {cmd.p1, cmd.ptype[2]};
                sync_slot   <= {cmd.ptype[1:0], cmd.npkt, cmd.mode, cmd.arg};
              end
              OP_CFG: cfg_load <= 1'b1;
              default: ;
            endcase
            st <= S_DONE;
          end
        end
        S_SEARCH: if (found) begin slot_set_en <= 1'b1; st <= S_DONE; end
        S_DONE: begin
          if (!run || pc + 1'b1 >= ncmd) begin
            halted <= 1'b1;
            st     <= run ? S_DONE : S_IDLE;
          end else begin
            pc <= pc + 1'b1;
            st <= S_FETCH;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule

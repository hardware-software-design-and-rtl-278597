// modem_if -- programmable modem interface unit between the processor and the
// baseband transmit and receive paths.
//
// Built from the blocks of the interface unit: the AMBA (APB) bus interface, the
// command, configuration, transmit-data and receive-data memories, the slot counter,
// the command translator, the scrambler initialisation, the memory address generator
// and the interrupt generator (the puncturing control sits beside the puncturer and
// depuncturer in the data paths). The processor writes a command program and the
// payload, sets CTRL.run, and the unit executes the program slot by slot, moving
// payload bytes to the transmit path and received bytes to the receive memory, and
// raising interrupts for synchronisation found, end of receive and end of transmit.
// CFG copies configuration word 0 ([3:0] frame counter) and word 1 (preamble search
// energy threshold) into registers. A BCH search gives up, without the sync
// interrupt, after the number of frames set by RESET (0 = search forever).
// Memory sizes are this design's choices.
module modem_if
  import h2_pkg::*;
#(
  parameter int CLKS_PER_SLOT   = 40,
  parameter int SLOTS_PER_FRAME = 5000
) (
  input  logic        clk,
  input  logic        rst_n,
  // AMBA APB slave
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [15:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic [2:0]  irq,
  // RF interface
  output logic        iq_en,
  // transmit path
  output logic        tx_start,
  output burst_t      tx_burst,
  output logic        tx_flush,
  input  logic        tx_busy,
  input  logic        tx_done,
  output logic [7:0]  tx_byte,
  output logic        tx_byte_valid,
  input  logic        tx_byte_ready,
  // receive path
  output logic        rx_start,
  output burst_t      rx_burst,
  output logic        rx_flush,
  input  logic        rx_busy,
  input  logic        rx_done,
  input  logic [7:0]  rx_byte,
  input  logic        rx_byte_valid,
  // synchronisation
  output logic        search,
  input  logic        found,
  output logic [39:0] sync_thr,
  output logic [12:0] slot
);
  logic [3:0]  mem_en;
  logic        mem_we;
  logic [9:0]  mem_addr;
  logic [31:0] mem_wdata, cmd_rd, cfg_rd, txm_rd, rxm_rd;
  logic        run, halted;
  logic [6:0]  ncmd, pc;
  logic [2:0]  irq_mask, irq_clr, irq_status;
  logic        cm_en;
  logic [5:0]  cm_addr;
  logic [31:0] cm_rdata, cfgb_rdata, txb_rdata;
  logic        txm_en, rxm_we;
  logic [9:0]  txm_addr, rxm_addr;
  logic [31:0] rxm_wdata;
  burst_t      burst;
  logic        ptr_reset, slot_set_en, cfg_load, found_or_to;
  logic [12:0] sync_slot;
  logic [1:0]  sync_frames;
  logic [3:0]  frame, frame_prev, cfg_frame;
  logic        frame_load, slot_tick;
  logic [1:0]  cfg_st;
  logic [1:0]  srch_frames;
  logic [6:0]  seed;
  logic        seed_load;
  op_e         cur_op;

  bus_if u_bus (.clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .pslverr, .mem_en, .mem_we, .mem_addr, .mem_wdata, .cmd_rdata(cmd_rd),
    .cfg_rdata(cfg_rd), .txm_rdata(txm_rd), .rxm_rdata(rxm_rd), .run, .ncmd, .irq_mask,
    .irq_clr, .irq_status, .slot, .tx_busy, .rx_busy, .halted, .pc);

  dp_ram #(.DEPTH(64)) u_cmd_mem (.clk, .a_en(mem_en[0]), .a_we(mem_we),
    .a_addr(mem_addr[5:0]), .a_wdata(mem_wdata), .a_rdata(cmd_rd), .b_en(cm_en),
    .b_we(1'b0), .b_addr(cm_addr), .b_wdata('0), .b_rdata(cm_rdata));

  dp_ram #(.DEPTH(4)) u_cfg_mem (.clk, .a_en(mem_en[1]), .a_we(mem_we),
    .a_addr(mem_addr[1:0]), .a_wdata(mem_wdata), .a_rdata(cfg_rd), .b_en(1'b1),
    .b_we(1'b0), .b_addr(2'(cfg_st == 2'd1)), .b_wdata('0), .b_rdata(cfgb_rdata));

  dp_ram #(.DEPTH(1024)) u_tx_mem (.clk, .a_en(mem_en[2]), .a_we(mem_we),
    .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(txm_rd), .b_en(txm_en),
    .b_we(1'b0), .b_addr(txm_addr), .b_wdata('0), .b_rdata(txb_rdata));

  dp_ram #(.DEPTH(1024)) u_rx_mem (.clk, .a_en(mem_en[3]), .a_we(mem_we),
    .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(rxm_rd), .b_en(rxm_we),
    .b_we(rxm_we), .b_addr(rxm_addr), .b_wdata(rxm_wdata), .b_rdata());

  slot_counter #(.CLKS_PER_SLOT(CLKS_PER_SLOT), .SLOTS_PER_FRAME(SLOTS_PER_FRAME)) u_slot (
    .clk, .rst_n, .load(found && search), .load_val(sync_slot), .frame_load,
    .frame_val(cfg_frame), .slot, .frame, .slot_tick);

  cmd_translator u_ct (.clk, .rst_n, .run, .ncmd, .cm_en, .cm_addr, .cm_rdata, .slot,
    .tx_busy, .rx_busy, .tx_start, .rx_start, .burst, .iq_en, .flush_tx(tx_flush),
    .flush_rx(rx_flush), .ptr_reset, .slot_set_en, .sync_slot, .sync_frames, .search,
    .found(found_or_to), .cfg_load, .halted, .pc, .cur_op);

  scr_init u_si (.clk, .rst_n, .burst_start(tx_start | rx_start), .mode_set(1'b0),
    .mode(burst.mode), .frame, .seed, .load(seed_load));

  addr_gen u_ag (.clk, .rst_n, .ptr_reset, .tx_start, .tx_nbytes(burst.nbytes), .txm_en,
    .txm_addr, .txm_rdata(txb_rdata), .tx_byte, .tx_byte_valid, .tx_byte_ready,
    .rx_start, .rx_byte, .rx_byte_valid, .rxm_we, .rxm_addr, .rxm_wdata);

  irq_gen u_irq (.clk, .rst_n, .evt({tx_done, rx_done, found && search}), .clr(irq_clr),
    .mask(irq_mask), .status(irq_status), .irq, .irq_any());

  always_comb begin
    tx_burst      = burst;
    tx_burst.seed = seed;
    rx_burst      = burst;
    rx_burst.seed = seed;
  end

  // configuration loader: word 0 -> frame counter, word 1 -> search threshold
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_st <= '0; cfg_frame <= '0; frame_load <= 1'b0; sync_thr <= 40'd1000000;
    end else begin
      frame_load <= 1'b0;
      case (cfg_st)
        2'd0: if (cfg_load) cfg_st <= 2'd1;          // word 0 read issued (address 0)
        2'd1: begin cfg_st <= 2'd2; cfg_frame <= cfgb_rdata[3:0]; frame_load <= 1'b1; end
        2'd2: begin cfg_st <= 2'd0; sync_thr <= 40'(cfgb_rdata); end
        default: cfg_st <= '0;
      endcase
    end
  end

  // BCH search timeout in frames
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_prev <= '0; srch_frames <= '0;
    end else begin
      frame_prev <= frame;
      if (!search)                  srch_frames <= '0;
      else if (frame != frame_prev) srch_frames <= srch_frames + 1'b1;
    end
  end
  assign found_or_to = found || (sync_frames != 0 && srch_frames >= sync_frames);

  // a command executes only at its slot and in program order
  assert property (@(posedge clk) disable iff (!rst_n) !(tx_start && rx_start));
endmodule

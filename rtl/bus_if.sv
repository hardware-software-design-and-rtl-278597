// bus_if -- AMBA (APB) slave of the modem interface unit.
//
// Gives the processor access to the modem memories and registers. Byte addresses:
//   0x0000-0x00FC  command memory (64 words)
//   0x0100 CTRL    [0] run the command program, [14:8] number of commands
//   0x0104 IRQ     interrupt status, write 1 to clear
//   0x0108 MASK    interrupt enable mask
//   0x010C STATUS  [12:0] slot, [16] transmit busy, [17] receive busy, [18] halted,
//                  [26:20] program counter (read only)
//   0x0200-0x020C  configuration memory (4 words)
//   0x1000-0x1FFC  transmit data memory (1024 words)
//   0x2000-0x2FFC  receive data memory (1024 words)
// APB timing with no wait states: a read addresses the memory in the setup phase and
// returns its registered output in the access phase; a write happens in the access
// phase. Accesses outside the map return 0 and set PSLVERR. The design specifies an
// AMBA slave; APB and the map are this design's choices.
module bus_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [15:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // memories (port A)
  output logic [3:0]  mem_en,     // 0 command, 1 configuration, 2 transmit, 3 receive
  output logic        mem_we,
  output logic [9:0]  mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] cmd_rdata,
  input  logic [31:0] cfg_rdata,
  input  logic [31:0] txm_rdata,
  input  logic [31:0] rxm_rdata,
  // registers
  output logic        run,
  output logic [6:0]  ncmd,
  output logic [2:0]  irq_mask,
  output logic [2:0]  irq_clr,
  input  logic [2:0]  irq_status,
  input  logic [12:0] slot,
  input  logic        tx_busy,
  input  logic        rx_busy,
  input  logic        halted,
  input  logic [6:0]  pc
);
  typedef enum logic [2:0] {R_CMD, R_REG, R_CFG, R_TXM, R_RXM, R_BAD} reg_e;
  reg_e rgn;
  logic setup, access;

  always_comb begin
    rgn = R_BAD;
    case (paddr[13:12])
      2'd0: case (paddr[9:8])
              2'd0: rgn = R_CMD;
              2'd1: rgn = (paddr[7:4] == 4'd0) ? R_REG : R_BAD;
              2'd2: rgn = (paddr[7:4] == 4'd0) ? R_CFG : R_BAD;
              default: rgn = R_BAD;
            endcase
      2'd1: rgn = R_TXM;
      2'd2: rgn = R_RXM;
      default: rgn = R_BAD;
    endcase
    if (paddr[15:14] != 2'b00) rgn = R_BAD;
  end

  assign setup     = psel && !penable;
  assign access    = psel && penable;
  assign pready    = 1'b1;
  assign pslverr   = access && (rgn == R_BAD);
  assign mem_we    = access && pwrite;
  assign mem_addr  = paddr[11:2];
  assign mem_wdata = pwdata;

  always_comb begin
    logic hit;
    hit    = (setup && !pwrite) || (access && pwrite);
    mem_en = '0;
    case (rgn)
      R_CMD: mem_en[0] = hit;
      R_CFG: mem_en[1] = hit;
      R_TXM: mem_en[2] = hit;
      R_RXM: mem_en[3] = hit;
      default: ;
    endcase
  end

  always_comb begin
    prdata = '0;
    if (access && !pwrite) begin
      case (rgn)
        R_CMD: prdata = cmd_rdata;
        R_CFG: prdata = cfg_rdata;
        R_TXM: prdata = txm_rdata;
        R_RXM: prdata = rxm_rdata;
        R_REG: case (paddr[3:2])
                 2'd0: prdata = {17'd0, ncmd, 7'd0, run};
                 2'd1: prdata = {29'd0, irq_status};
                 2'd2: prdata = {29'd0, irq_mask};
                 default: prdata = {5'd0, pc, 1'b0, halted, rx_busy, tx_busy, 3'd0, slot};
               endcase
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; ncmd <= '0; irq_mask <= '0; irq_clr <= '0;
    end else begin
      irq_clr <= '0;
      if (access && pwrite && rgn == R_REG) begin
        case (paddr[3:2])
          2'd0: begin run <= pwdata[0]; ncmd <= pwdata[14:8]; end
          2'd1: irq_clr  <= pwdata[2:0];
          2'd2: irq_mask <= pwdata[2:0];
          default: ;
        endcase
      end
    end
  end
endmodule

// aic: Advanced Interrupt Controller of the SoC.
//
// Up to NSRC interrupt sources, source 0 being the fast interrupt (FIQ) and
// sources 1..NSRC-1 normal interrupts (IRQ). Each source has a mode register
// (SMR: priority in bits 2:0, one of eight levels with 7 the highest; bit 5
// selects rising-edge instead of high-level sensitivity) and a vector register
// (SVR) holding its handler address. Among the enabled pending IRQ sources the
// one with the highest priority (lowest number on a tie) is the candidate
// (cand_src). The IRQ line is raised when the candidate's level is above the
// level being serviced, which gives nested interrupts: reading IVR returns
// the candidate's vector, pushes its level on an 8-entry stack and clears an
// edge-triggered request; writing EOICR pops the stack. FIQ is raised while
// source 0 is enabled and pending.
//
// Register byte offsets (peripheral bus, one-cycle access, see pbus_if):
//   0x000+4i SMR[i]  0x080+4i SVR[i]  0x100 IVR  0x104 FVR  0x108 ISR
//   0x10C IPR  0x110 IMR  0x114 CISR  0x120 IECR  0x124 IDCR  0x128 ICCR
//   0x12C ISCR  0x130 EOICR  0x134 SPU
// The 32 sources and 8-level priority follow the SoC description; the
// register layout follows the AT91-family controller the SoC clones, and the
// simplified source types are this design's choice.
module aic #(
  parameter int unsigned NSRC = 32,
  localparam int unsigned IW = $clog2(NSRC)
) (
  input  logic            clk,
  input  logic            rst_n,
  pbus_if.slave           bus,
  input  logic [NSRC-1:0] src,
  output logic            irq,
  output logic            fiq,
  output logic [IW-1:0]   cand_src,
  output logic            cand_valid,
  output logic [IW-1:0]   cur_src      // source being serviced (ISR)
);
  logic [NSRC-1:0][2:0]  prior;
  logic [NSRC-1:0]       edge_mode;
  logic [NSRC-1:0][31:0] svr;
  logic [31:0]           spu;
  logic [NSRC-1:0]       imr, edge_pend, src_q;
  logic [7:0][2:0]       stk_lvl;
  logic [7:0][IW-1:0]    stk_src;
  logic [3:0]            depth;

  logic [NSRC-1:0] pend;
  for (genvar i = 0; i < NSRC; i++) begin : g_pend
    assign pend[i] = edge_mode[i] ? edge_pend[i] : src[i];
  end

  // highest-priority enabled pending IRQ source
  always_comb begin
    cand_src   = '0;
    cand_valid = 1'b0;
    for (int i = NSRC - 1; i >= 1; i--) begin
      if (pend[i] && imr[i] && (!cand_valid || prior[i] >= prior[cand_src])) begin
        cand_src   = IW'(i);
        cand_valid = 1'b1;
      end
    end
  end

  logic [2:0] cur_lvl;
  assign cur_lvl = (depth != 0) ? stk_lvl[depth-1] : 3'd0;
  assign cur_src = (depth != 0) ? stk_src[depth-1] : '0;
  assign irq = cand_valid && (depth == 0 || prior[cand_src] > cur_lvl);
  assign fiq = pend[0] && imr[0];

  logic rd, wr;
  assign rd = bus.sel && !bus.we;
  assign wr = bus.sel && bus.we;

  always_comb begin
    bus.rdata = '0;
    if (bus.addr < 12'h080)      bus.rdata = {26'b0, edge_mode[bus.addr[6:2]], 2'b0, prior[bus.addr[6:2]]};
    else if (bus.addr < 12'h100) bus.rdata = svr[bus.addr[6:2]];
    else begin
      case (bus.addr)
        12'h100: bus.rdata = irq ? svr[cand_src] : spu;
        12'h104: bus.rdata = svr[0];
        12'h108: bus.rdata = 32'(cur_src);
        12'h10C: bus.rdata = 32'(pend);
        12'h110: bus.rdata = 32'(imr);
        12'h114: bus.rdata = {30'b0, irq, fiq};
        12'h134: bus.rdata = spu;
        default: bus.rdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prior <= '0; edge_mode <= '0; svr <= '0; spu <= '0;
      imr <= '0; edge_pend <= '0; src_q <= '0;
      stk_lvl <= '0; stk_src <= '0; depth <= '0;
    end else begin
      src_q <= src;
      for (int i = 0; i < NSRC; i++)
        if (src[i] && !src_q[i]) edge_pend[i] <= 1'b1;
      if (wr) begin
        if (bus.addr < 12'h080) begin
          prior[bus.addr[6:2]]     <= bus.wdata[2:0];
          edge_mode[bus.addr[6:2]] <= bus.wdata[5];
        end else if (bus.addr < 12'h100) begin
          svr[bus.addr[6:2]] <= bus.wdata;
        end else begin
          case (bus.addr)
            12'h120: imr <= imr | NSRC'(bus.wdata);
            12'h124: imr <= imr & ~NSRC'(bus.wdata);
            12'h128: edge_pend <= edge_pend & ~NSRC'(bus.wdata);
            12'h12C: edge_pend <= edge_pend | NSRC'(bus.wdata);
            12'h130: if (depth != 0) depth <= depth - 1'b1;
            12'h134: spu <= bus.wdata;
            default: ;
          endcase
        end
      end
      if (rd && bus.addr == 12'h100 && irq && depth < 4'd8) begin
        stk_lvl[depth[2:0]]  <= prior[cand_src];
        stk_src[depth[2:0]]  <= cand_src;
        depth                <= depth + 1'b1;
        edge_pend[cand_src]  <= 1'b0;
      end
      if (rd && bus.addr == 12'h104) edge_pend[0] <= 1'b0;
    end
  end
endmodule

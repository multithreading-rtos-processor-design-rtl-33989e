// pit: Periodic Interval Timer, the source of the OS tick interrupt.
//
// A prescaler divides the clock by PRESCALE; each prescaled step advances the
// current value CPIV. When CPIV reaches the programmed interval PIV it
// restarts at 0, the status bit PITS is set, the overflow count PICNT is
// incremented and, if enabled, the interrupt line rises. Reading PIVR returns
// CPIV and PICNT and clears PITS and PICNT (acknowledging the tick); PIIR
// returns the same without side effects. With a 33 MHz clock and the default
// PRESCALE of 16, PIV = 20624 gives the 10 ms tick the RTOS uses.
//
// Register byte offsets (see pbus_if): 0x0 MR (PIV 19:0, PITEN 24, PITIEN 25),
// 0x4 SR (PITS 0), 0x8 PIVR, 0xC PIIR (CPIV 19:0, PICNT 31:20).
// The SoC names the timer and its 10 ms period; the register set follows the
// AT91-family timer it clones and the prescaler value is this design's choice.
module pit #(
  parameter int unsigned PRESCALE = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  pbus_if.slave bus,
  output logic  irq,
  output logic  tick        // one-cycle pulse at every interval end
);
  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;
  logic [19:0]   piv, cpiv;
  logic          piten, pitien, pits;
  logic [11:0]   picnt;
  logic [PW-1:0] pre;

  logic step, wrap;
  assign step = piten && (pre == PW'(PRESCALE - 1));
  assign wrap = step && (cpiv == piv);
  assign tick = wrap;
  assign irq  = pits && pitien;

  always_comb begin
    case (bus.addr[3:2])
      2'd0:    bus.rdata = {6'b0, pitien, piten, 4'b0, piv};
      2'd1:    bus.rdata = {31'b0, pits};
      default: bus.rdata = {picnt, cpiv};
    endcase
  end

  logic ack;
  assign ack = bus.sel && !bus.we && bus.addr[3:2] == 2'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      piv <= 20'hF_FFFF; piten <= 1'b0; pitien <= 1'b0;
      cpiv <= '0; pits <= 1'b0; picnt <= '0; pre <= '0;
    end else begin
      if (bus.sel && bus.we && bus.addr[3:2] == 2'd0) begin
        piv    <= bus.wdata[19:0];
        piten  <= bus.wdata[24];
        pitien <= bus.wdata[25];
      end
      if (piten) pre <= (pre == PW'(PRESCALE - 1)) ? '0 : pre + 1'b1;
      else       pre <= '0;
      if (step) cpiv <= wrap ? '0 : cpiv + 1'b1;
      if (ack) begin
        pits  <= wrap;
        picnt <= wrap ? 12'd1 : 12'd0;
      end else if (wrap) begin
        pits  <= 1'b1;
        picnt <= picnt + 1'b1;
      end
    end
  end
endmodule

// taic: Task-Aware Interrupt Controller, a wrapper around the AIC that puts
// interrupts and threads into one priority space.
//
// Two kinds of 8-bit registers are added. RTP (Running Thread Priority) holds
// the priority of the thread running on the CPU; the kernel stores it on
// every context restore. ITP[i] (Interrupt-Thread Priority) holds the priority
// of the thread that configured source i: whenever software writes a source
// mode register SMR[i], the current RTP is copied into ITP[i]. An IRQ the AIC
// would raise for candidate source i reaches the CPU only if
// ITP[i] >= RTP; otherwise it stays pending, without disturbing the CPU,
// until a thread of low enough priority runs. FIQ bypasses the comparison.
// Numerically larger values are higher priorities here. With RTP left at 0
// the controller behaves as the plain AIC.
//
// Register byte offsets: the AIC's, plus 0x14C RTP (read/write) and
// 0x180+4i ITP[i] (read only). The RTP address and the ITP/RTP behaviour
// follow the controller's description; the ITP read-back window and copying
// on the SMR write (rather than on the enable) are this design's choices.
module taic #(
  parameter int unsigned NSRC = 32,
  localparam int unsigned IW = $clog2(NSRC)
) (
  input  logic            clk,
  input  logic            rst_n,
  pbus_if.slave           bus,
  input  logic [NSRC-1:0] src,
  output logic            irq,
  output logic            fiq,
  output logic            irq_held,     // AIC wants the CPU but TAIC holds it back
  output logic [7:0]      rtp_o
);
  localparam logic [11:0] RTP_OFF = 12'h14C;
  localparam logic [11:0] ITP_OFF = 12'h180;

  logic [7:0]            rtp;
  logic [NSRC-1:0][7:0]  itp;
  logic                  aic_irq, cand_valid;
  logic [IW-1:0]         cand_src, cur_src;

  logic own;
  assign own = (bus.addr == RTP_OFF) || (bus.addr >= ITP_OFF && bus.addr < ITP_OFF + 12'(4 * NSRC));

  pbus_if aic_bus ();
  assign aic_bus.sel   = bus.sel && !own;
  assign aic_bus.we    = bus.we;
  assign aic_bus.addr  = bus.addr;
  assign aic_bus.wdata = bus.wdata;

  aic #(.NSRC(NSRC)) u_aic (
    .clk, .rst_n, .bus(aic_bus), .src, .irq(aic_irq), .fiq,
    .cand_src, .cand_valid, .cur_src
  );

  always_comb begin
    if (bus.addr == RTP_OFF)  bus.rdata = {24'b0, rtp};
    else if (own)             bus.rdata = {24'b0, itp[bus.addr[IW+1:2]]};
    else                      bus.rdata = aic_bus.rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rtp <= '0;
      itp <= '0;
    end else if (bus.sel && bus.we) begin
      if (bus.addr == RTP_OFF)   rtp <= bus.wdata[7:0];
      else if (bus.addr < 12'h080) itp[bus.addr[IW+1:2]] <= rtp;
    end
  end

  logic pass;
  assign pass     = itp[cand_src] >= rtp;
  assign irq      = aic_irq && pass;
  assign irq_held = aic_irq && cand_valid && !pass;
  assign rtp_o    = rtp;

  logic unused_ok;
  assign unused_ok = ^cur_src;
endmodule

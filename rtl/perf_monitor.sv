// perf_monitor: Performance Monitor peripheral that measures, in clock
// cycles, how long a chosen piece of code takes, without changing the code.
//
// Software programs the address of the first instruction (START) and of the
// last one (END) and sets EN. The monitor watches the pipeline: when the
// instruction at START is fetched from memory it starts counting, and when
// the instruction at END completes write-back it stops. COUNT then holds the
// number of cycles from the fetch cycle to the write-back cycle, both
// included; DONE is set and, if IRQEN is set, the interrupt line rises so an
// interrupt routine can read the result. Clearing DONE re-arms the monitor, so
// repeated runs of the same code expose its jitter.
//
// Register byte offsets (see pbus_if): 0x00 CTRL (EN 0, IRQEN 1), 0x04 START,
// 0x08 END, 0x0C COUNT (read only), 0x10 STATUS (DONE 0, BUSY 1; writing 1 to
// bit 0 clears DONE). The fetch-to-write-back measurement and the interrupt
// follow the monitor's description; the register layout is this design's.
module perf_monitor (
  input  logic        clk,
  input  logic        rst_n,
  pbus_if.slave       bus,
  input  logic        if_valid,    // an instruction is fetched from memory
  input  logic [31:0] if_addr,
  input  logic        wb_valid,    // an instruction completes write-back
  input  logic [31:0] wb_addr,
  output logic        irq
);
  logic        en, irqen, done, busy;
  logic [31:0] start_a, end_a, count;

  logic fire_start, fire_end;
  assign fire_start = en && !busy && !done && if_valid && if_addr == start_a;
  assign fire_end   = busy && wb_valid && wb_addr == end_a;
  assign irq        = done && irqen;

  always_comb begin
    case (bus.addr[4:2])
      3'd0:    bus.rdata = {30'b0, irqen, en};
      3'd1:    bus.rdata = start_a;
      3'd2:    bus.rdata = end_a;
      3'd3:    bus.rdata = count;
      3'd4:    bus.rdata = {30'b0, busy, done};
      default: bus.rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= 1'b0; irqen <= 1'b0; done <= 1'b0; busy <= 1'b0;
      start_a <= '0; end_a <= '0; count <= '0;
    end else begin
      if (bus.sel && bus.we) begin
        case (bus.addr[4:2])
          3'd0: begin en <= bus.wdata[0]; irqen <= bus.wdata[1]; end
          3'd1: start_a <= bus.wdata;
          3'd2: end_a   <= bus.wdata;
          3'd4: if (bus.wdata[0]) done <= 1'b0;
          default: ;
        endcase
      end
      if (fire_start) begin
        busy  <= 1'b1;
        count <= 32'd1;
      end else if (busy) begin
        count <= count + 1'b1;
        if (fire_end) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule

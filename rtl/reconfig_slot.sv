// reconfig_slot: configuration store and load sequencer of one
// reconfigurable slot.
//
// Each slot is reconfigured independently of the others, so one slot can be
// loading new configuration bits while the rest keep computing. A load
// starts with a one-cycle start pulse carrying the steering vector to use
// (sel_in). The slot latches that select and drives it to its bus for the
// whole load, steps word_addr from 0 to WORDS-1 and writes the W-bit word
// on its bus into cfg[word_addr*W +: W], one word per bus cycle.
// A functional unit that spans several adjacent slots is loaded by starting
// those slots in the same cycle.
//
// Timing: start in cycle t; words are taken at the clock edges ending cycles
// t+1 .. t+WORDS; busy is high during cycles t+1 .. t+WORDS; done pulses and
// ready rises in cycle t+WORDS+1. A load therefore takes SLOT_BITS/W bus
// cycles. ready is low while loading, because a slot being rewritten cannot
// compute. A start while busy is ignored. Reset is synchronous and active
// low; it clears cfg and ready. The
// start-while-busy rule, the held select and the reset values are this
// design's own choices.
module reconfig_slot #(
  parameter int unsigned K         = 2,
  parameter int unsigned W         = 64,
  parameter int unsigned SLOT_BITS = 1024,
  parameter int unsigned SELW      = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned WORDS     = SLOT_BITS / W,
  parameter int unsigned AW        = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [SELW-1:0]      sel_in,
  output logic [SELW-1:0]      sel,
  output logic [AW-1:0]        word_addr,
  input  logic [W-1:0]         bus,
  output logic                 busy,
  output logic                 ready,
  output logic                 done,
  output logic [SLOT_BITS-1:0] cfg
);

  localparam logic [AW-1:0] LAST = AW'(WORDS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel       <= '0;
      word_addr <= '0;
      busy      <= 1'b0;
      ready     <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          sel       <= sel_in;
          word_addr <= '0;
          busy      <= 1'b1;
          ready     <= 1'b0;
        end
      end else begin
        if (word_addr == LAST) begin
          busy  <= 1'b0;
          ready <= 1'b1;
          done  <= 1'b1;
        end else begin
          word_addr <= word_addr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    cfg <= '0;
    else if (busy) cfg[word_addr*W +: W] <= bus;
  end

  initial assert (SLOT_BITS % W == 0 && WORDS >= 1)
    else $fatal(1, "reconfig_slot: SLOT_BITS must be a non-zero multiple of W");

  // A load lasts exactly WORDS cycles.
  property p_load_len;
    @(posedge clk) disable iff (!rst_n) (start && !busy) |=> busy [*WORDS] ##1 (done && ready);
  endproperty
  assert property (p_load_len);

endmodule

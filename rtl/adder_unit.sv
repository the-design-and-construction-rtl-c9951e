// adder_unit: base address register, modifier adder and interrupt bistable.
//
// The master computer places a symbol by loading a base address: it first
// pulses base_clear, then base_load ORs base_in into the cleared register
// (the register is preset bit by bit, so a load without a clear merges the
// two addresses, as in the original board). The microcomputer then presents
// address modifiers on OUT1/OUT2; the adder adds the modifier
// (vdu_pkg::modifier) to the base address and offers the 18-bit sum to
// register A. When OUT1/OUT2 come with OUT3 = 002 and STP rises, the sum is
// written back into the base register instead, moving the datum for the
// next character, and an interrupt is recorded.
//
// The base register is BASE_W = 17 bits wide, as built: base addresses must
// lie in the first field (bit 17 zero); the field bit of the sum comes only
// from OUT2 bit 7 and any carry. The interrupt bistable is set after a base
// change, on set_int_store from the insertion/deletion control, or on
// master_int from the master computer, and holds until STP falls.
//
// Timing: one clock domain, clk. base_load/base_clear are levels sampled on
// clk; the STP.(OUT3=002) base change acts on the first clock that sees it
// (edge detected). int_set goes high the clock after the event and drops
// the clock after STP falls.
//
// Follows the document: widths, bit mapping, clear-then-load protocol, the
// three interrupt sources and the release on STP. Own choices: synchronous
// logic on one clock with edge detectors in place of edge-clocked flip-flops,
// an active-high synchronous reset, and active-high port polarities.
module adder_unit
  import vdu_pkg::*;
#(
  parameter int BASE_W = 17
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [BASE_W-1:0] base_in,      // base address bits from the master
  input  logic              base_clear,   // CLEAR BASE ADDRESS
  input  logic              base_load,    // BASE ADDRESS LOAD
  input  logic [7:0]        out1,         // flag + intra-line modifier
  input  logic [7:0]        out2,         // field bit + line modifier
  input  logic [7:0]        out3,         // action code
  input  logic              stp,          // microcomputer halted
  input  logic              set_int_store,// insert/delete finished
  input  logic              master_int,   // master computer has data
  output addr_t             base_addr,    // current datum
  output addr_t             sum,          // base + modifier, to register A
  output logic              flag,         // OUT1 bit 7, to register A
  output logic              int_set       // interrupt to the microcomputer
);

  logic [BASE_W-1:0] base_q;
  logic              base_strobe, base_strobe_q;

  assign base_addr = addr_t'(base_q);
  assign sum       = base_addr + modifier(out1, out2);
  assign flag      = out1[7];

  assign base_strobe = stp && (out3 == OUT3_BASE);

  always_ff @(posedge clk) begin
    if (rst) begin
      base_q        <= '0;
      base_strobe_q <= 1'b0;
      int_set       <= 1'b0;
    end else begin
      base_strobe_q <= base_strobe;
      if (base_clear)
        base_q <= '0;
      else if (base_load)
        base_q <= base_q | base_in;
      else if (base_strobe && !base_strobe_q)
        base_q <= sum[BASE_W-1:0];

      if (!stp && !master_int)
        int_set <= 1'b0;
      else if ((base_strobe && !base_strobe_q) || set_int_store || master_int)
        int_set <= 1'b1;
    end
  end

endmodule

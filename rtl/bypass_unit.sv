// bypass_unit: operand bypassing for one operand of PrepOp-DC (vBP + sBP).
//
// Looks for the requested register among the instructions in flight,
// youngest first, lane by lane: the vector register file is banked per lane
// and an instruction may write single lanes, so each lane takes its value
// from the youngest instruction that writes that lane of the register. For a
// scalar register only lane 0 is looked up. When the youngest writer of a
// needed lane has not yet reached the stage at which its result is valid
// (each instruction carries that stage index from the decoder), `stall`
// asks the decoder to wait; otherwise `hit` tells the following multiplexer
// to take `data` instead of the register-file value. Combinational.
// Bypassing by the injected result-stage index follows the document; the
// per-lane search is this design's own choice.
module bypass_unit
  import napcore_pkg::*;
(
  input  logic                need,       // the operand is read at all
  input  logic                scalar,     // 1: scalar register file, 0: vector
  input  logic [RW-1:0]       idx,
  input  bp_slot_t [NBP-1:0]  slots,      // slot 0 is the youngest
  output logic [P-1:0]        hit,
  output vec_t                data,
  output logic                stall
);
  logic found;
  always_comb begin
    hit   = '0;
    data  = '0;
    stall = 1'b0;
    for (int l = 0; l < P; l++) begin
      found = 1'b0;
      for (int s = 0; s < NBP; s++) begin
        if (!found && need && slots[s].valid && slots[s].rd == idx &&
            (scalar ? (slots[s].wr_s && l == 0) : (slots[s].wr_v && slots[s].wmask[l]))) begin
          found = 1'b1;
          if (slots[s].ready) begin
            hit[l]  = 1'b1;
            data[l] = slots[s].data[0];
            if (!scalar) data[l] = slots[s].data[l];
          end else begin
            stall = 1'b1;
          end
        end
      end
    end
  end
endmodule

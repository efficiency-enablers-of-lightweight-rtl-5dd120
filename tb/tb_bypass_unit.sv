// tb_bypass_unit: random in-flight slot contents; the expected per-lane
// hit, data and stall are found by a youngest-first search in the bench.
module tb_bypass_unit;
  import napcore_pkg::*;
  logic need, scalar;
  logic [RW-1:0] idx;
  bp_slot_t [NBP-1:0] slots;
  logic [P-1:0] hit;
  vec_t data;
  logic stall;
  int checks = 0, failures = 0, nstall = 0, nhit = 0;
  bypass_unit dut (.need, .scalar, .idx, .slots, .hit, .data, .stall);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [P-1:0] eh; logic es; cplx_t ed [P]; bit done;
    for (int i = 0; i < 3000; i++) begin
      need = ($urandom_range(0, 7) != 0); scalar = 1'($urandom); idx = RW'($urandom_range(0, 3));
      for (int s = 0; s < NBP; s++) begin
        slots[s].valid = 1'($urandom); slots[s].wr_v = 1'($urandom); slots[s].wr_s = 1'($urandom);
        slots[s].rd = RW'($urandom_range(0, 3)); slots[s].wmask = P'($urandom);
        slots[s].ready = 1'($urandom);
        slots[s].data = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      end
      #1;
      eh = '0; es = 0;
      for (int l = 0; l < P; l++) begin
        done = 0; ed[l] = '0;
        for (int s = 0; s < NBP; s++) begin
          if (!done && need && slots[s].valid && slots[s].rd == idx &&
              ((scalar && slots[s].wr_s && l == 0) || (!scalar && slots[s].wr_v && slots[s].wmask[l]))) begin
            done = 1;
            if (slots[s].ready) begin eh[l] = 1; ed[l] = scalar ? slots[s].data[0] : slots[s].data[l]; end
            else es = 1;
          end
        end
      end
      checks++;
      if (hit !== eh || stall !== es) begin failures++; $display("FAIL hit %b/%b stall %b/%b", hit, eh, stall, es); end
      for (int l = 0; l < P; l++) if (eh[l]) begin
        checks++; if (data[l] !== ed[l]) failures++;
      end
      nstall += int'(es); nhit += int'(eh != 0);
    end
    checks++; if (nstall == 0 || nhit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

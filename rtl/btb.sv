// btb - branch target buffer of the Optium fetch/decode unit.
//
// Each entry remembers one conditional jump: its address (the tag) and the
// direction last predicted for it. The fetch/decode unit looks up the address
// of every conditional jump it fetches. On a miss it predicts statically and
// stores that prediction here (alloc); on a hit it uses the stored bit. When the
// execution unit finds that a prediction was wrong, it overwrites the entry
// with the actual outcome (upd), so the next encounter is predicted correctly.
//
// The document gives this function but not the size or organisation; chosen
// here: ENTRIES fully associative entries, one prediction bit each, round-robin
// replacement, lookup combinational, writes at the clock edge. An update for a
// jump whose entry has since been replaced is dropped. If an allocation and an
// update arrive in the same cycle for the same address, the update wins.
module btb #(
  parameter int unsigned ENTRIES = 4
) (
  input  logic       clk,
  input  logic       rst,
  // lookup and allocation (fetch/decode unit)
  input  logic [7:0] lookup_pc,
  output logic       lookup_hit,
  output logic       lookup_taken,
  input  logic       alloc_we,
  input  logic       alloc_taken,
  // correction (execution unit)
  input  logic       upd_we,
  input  logic [7:0] upd_pc,
  input  logic       upd_taken
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] valid;
  logic [7:0]         tag   [ENTRIES];
  logic [ENTRIES-1:0] taken;
  logic [IW-1:0]      victim;

  always_comb begin
    lookup_hit   = 1'b0;
    lookup_taken = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid[i] && tag[i] == lookup_pc) begin
        lookup_hit   = 1'b1;
        lookup_taken = taken[i];
      end
    end
  end

  logic           upd_hit;
  logic [IW-1:0]  upd_idx;
  always_comb begin
    upd_hit = 1'b0;
    upd_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid[i] && tag[i] == upd_pc) begin
        upd_hit = 1'b1;
        upd_idx = IW'(i);
      end
    end
  end

  // allocate only on a miss, and not over an entry being corrected
  logic do_alloc;
  assign do_alloc = alloc_we && !lookup_hit &&
                    !(upd_we && upd_hit && upd_idx == victim) &&
                    !(upd_we && upd_pc == lookup_pc);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid  <= '0;
      victim <= '0;
      taken  <= '0;
      for (int i = 0; i < ENTRIES; i++) tag[i] <= '0;
    end else begin
      if (do_alloc) begin
        valid[victim] <= 1'b1;
        tag[victim]   <= lookup_pc;
        taken[victim] <= alloc_taken;
        victim        <= (victim == IW'(ENTRIES - 1)) ? '0 : victim + 1'b1;
      end
      if (upd_we && upd_hit)
        taken[upd_idx] <= upd_taken;
    end
  end

endmodule

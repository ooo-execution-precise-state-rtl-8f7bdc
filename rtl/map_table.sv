// map_table: architectural-to-physical register map of an R10K-style core.
//
// Each architectural register has one entry holding the physical register
// tag it is currently mapped to plus a ready bit ("T+"). There is no
// architectural register file, so an entry is never empty: at reset
// register i maps to tag i and is ready.
//
//  - Dispatch reads the tags of the two sources (with their ready bits) and
//    the current tag of the destination (Told), then writes the newly
//    allocated tag for the destination with its ready bit clear.
//  - Complete: the tag on the CDB sets the ready bit of every entry that
//    maps to it. The source read ports see a tag on the CDB in the same
//    cycle, so an instruction dispatched while its producer completes is
//    captured as ready.
//  - Rollback restores one entry to its Told tag. The ready bit of the
//    restored tag comes from a per-physical-register ready vector that is
//    set by the CDB and cleared on allocation (own choice: the map entry
//    alone cannot tell whether an older tag has completed).
//
// Read ports are combinational; all updates take effect at the rising edge.
// The tag-plus-ready entry, the reset mapping and the three update rules
// follow the R10K scheme; the ready vector used on restore is this design's.
module map_table #(
  parameter int unsigned NUM_ARCH  = r10k_pkg::NUM_ARCH,
  parameter int unsigned NUM_PREGS = r10k_pkg::NUM_PREGS,
  localparam int unsigned AW = $clog2(NUM_ARCH),
  localparam int unsigned PW = $clog2(NUM_PREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // source lookups (T1, T2)
  input  logic [AW-1:0] rs1_areg,
  output logic [PW-1:0] rs1_tag,
  output logic          rs1_ready,
  input  logic [AW-1:0] rs2_areg,
  output logic [PW-1:0] rs2_tag,
  output logic          rs2_ready,
  // destination lookup (Told)
  input  logic [AW-1:0] rd_areg,
  output logic [PW-1:0] rd_told,
  // rename write at dispatch
  input  logic          ren_we,
  input  logic [PW-1:0] ren_tag,
  // complete: CDB tag broadcast
  input  logic          cdb_valid,
  input  logic [PW-1:0] cdb_tag,
  // serial rollback: restore one entry to Told
  input  logic          rst_we,
  input  logic [AW-1:0] rst_areg,
  input  logic [PW-1:0] rst_tag,
  // debug lookup
  input  logic [AW-1:0] dbg_areg,
  output logic [PW-1:0] dbg_tag,
  output logic          dbg_ready
);

  typedef struct packed {
    logic [PW-1:0] tag;
    logic          ready;
  } entry_t;

  entry_t               map_q [NUM_ARCH];
  logic [NUM_PREGS-1:0] preg_ready_q;

  function automatic logic cdb_hit(logic [PW-1:0] t, logic v, logic [PW-1:0] ct);
    return v && (t == ct);
  endfunction

  always_comb begin
    rs1_tag   = map_q[rs1_areg].tag;
    rs1_ready = map_q[rs1_areg].ready || cdb_hit(rs1_tag, cdb_valid, cdb_tag);
    rs2_tag   = map_q[rs2_areg].tag;
    rs2_ready = map_q[rs2_areg].ready || cdb_hit(rs2_tag, cdb_valid, cdb_tag);
    rd_told   = map_q[rd_areg].tag;
    dbg_tag   = map_q[dbg_areg].tag;
    dbg_ready = map_q[dbg_areg].ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_ARCH; i++) begin
        map_q[i].tag   <= PW'(i);
        map_q[i].ready <= 1'b1;
      end
      for (int unsigned p = 0; p < NUM_PREGS; p++)
        preg_ready_q[p] <= (p < NUM_ARCH);
    end else begin
      // complete
      if (cdb_valid) begin
        preg_ready_q[cdb_tag] <= 1'b1;
        for (int unsigned i = 0; i < NUM_ARCH; i++)
          if (map_q[i].tag == cdb_tag) map_q[i].ready <= 1'b1;
      end
      // dispatch rename (overrides a CDB hit on the old mapping)
      if (ren_we) begin
        map_q[rd_areg].tag   <= ren_tag;
        map_q[rd_areg].ready <= 1'b0;
        preg_ready_q[ren_tag] <= 1'b0;
      end
      // rollback restore
      if (rst_we) begin
        map_q[rst_areg].tag   <= rst_tag;
        map_q[rst_areg].ready <= preg_ready_q[rst_tag] || cdb_hit(rst_tag, cdb_valid, cdb_tag);
      end
    end
  end

  // Dispatch and rollback never update the map in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(ren_we && rst_we));

endmodule

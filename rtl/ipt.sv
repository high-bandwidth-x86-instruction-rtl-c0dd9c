// ipt: Instruction Pointer Table.
//
// Each of the ENTRIES entries records where the instructions of one run of
// sequential code start, so that a later fetch of the same PC gets several
// instruction pointers at once. As the published design lays out an entry, it holds a
// PC field and offset fields, and every field carries a valid bit v (the
// length of that instruction is known) and a split-line bit s (the
// instruction runs into the next cache line). Field k describes instruction k
// of the run; instruction 0 starts at the PC and instruction k (k >= 1) at
// offset off[k] from the start of the PC's cache line. off[DEGREE] is the end
// of the last instruction, so a full entry also yields the next fetch
// address. Offsets are line-relative, so an entry never spans more than the
// PC's line plus the tail of an instruction that crosses into the next line.
//
// Access is fully associative on the PC field (lowest matching index wins).
// Entries are replaced first-in-first-out, as in the published design.
//
// Ports: a lookup port (pc -> hit, hit_idx and the entry), a read port by
// index (rd_idx, used for the entry written in the previous cycle), an update
// port (wa_*) that rewrites an existing entry and an allocation port (wb_*)
// that writes a new entry at the FIFO head alloc_idx and advances the head.
// Both write ports may be used in one cycle on different entries; on the
// same entry the allocation wins. Lookup and read are combinational; writes
// take effect at the next rising clock edge. Reset invalidates all entries.
module ipt #(
  parameter int unsigned DEGREE     = 4,
  parameter int unsigned ENTRIES    = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned OFF_W     = $clog2(2 * LINE_BYTES) + 1,
  localparam int unsigned IDX_W     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // access
  input  logic [ADDR_W-1:0]             pc,
  output logic                          hit,
  output logic [IDX_W-1:0]              hit_idx,
  output logic [DEGREE-1:0]             hit_v,
  output logic [DEGREE-1:0]             hit_s,
  output logic [DEGREE:1][OFF_W-1:0]    hit_off,
  // read by index
  input  logic [IDX_W-1:0]              rd_idx,
  output logic                          rd_ev,
  output logic [ADDR_W-1:0]             rd_pc,
  output logic [DEGREE-1:0]             rd_v,
  output logic [DEGREE-1:0]             rd_s,
  output logic [DEGREE:1][OFF_W-1:0]    rd_off,
  // update of an existing entry
  input  logic                          wa_en,
  input  logic [IDX_W-1:0]              wa_idx,
  input  logic [DEGREE-1:0]             wa_v,
  input  logic [DEGREE-1:0]             wa_s,
  input  logic [DEGREE:1][OFF_W-1:0]    wa_off,
  // allocation of a new entry (FIFO replacement)
  input  logic                          wb_en,
  input  logic [ADDR_W-1:0]             wb_pc,
  input  logic [DEGREE-1:0]             wb_v,
  input  logic [DEGREE-1:0]             wb_s,
  input  logic [DEGREE:1][OFF_W-1:0]    wb_off,
  output logic [IDX_W-1:0]              alloc_idx
);

  logic                       ev  [ENTRIES];
  logic [ADDR_W-1:0]          tag [ENTRIES];
  logic [DEGREE-1:0]          vb  [ENTRIES];
  logic [DEGREE-1:0]          sb  [ENTRIES];
  logic [DEGREE:1][OFF_W-1:0] ob  [ENTRIES];
  logic [IDX_W-1:0]           head;

  // ---- access: associative match on the PC field ---------------------------
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ev[i] && tag[i] == pc) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
    hit_v   = vb[hit_idx];
    hit_s   = sb[hit_idx];
    hit_off = ob[hit_idx];
  end

  assign rd_ev     = ev[rd_idx];
  assign rd_pc     = tag[rd_idx];
  assign rd_v      = vb[rd_idx];
  assign rd_s      = sb[rd_idx];
  assign rd_off    = ob[rd_idx];
  assign alloc_idx = head;

  // ---- placement -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        ev[i] <= 1'b0;
        vb[i] <= '0;
        sb[i] <= '0;
      end
    end else begin
      if (wa_en) begin
        vb[wa_idx] <= wa_v;
        sb[wa_idx] <= wa_s;
        ob[wa_idx] <= wa_off;
      end
      if (wb_en) begin
        ev[head]  <= 1'b1;
        tag[head] <= wb_pc;
        vb[head]  <= wb_v;
        sb[head]  <= wb_s;
        ob[head]  <= wb_off;
        head      <= (int'(head) == ENTRIES - 1) ? '0 : head + 1'b1;
      end
    end
  end

  // Both write ports can hit one entry only if the table has a single entry.
  initial assert (ENTRIES >= 2) else $error("ipt: ENTRIES must be at least 2");

endmodule

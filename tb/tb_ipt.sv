// tb_ipt: checks the Instruction Pointer Table against a plain array model:
// lookups miss before anything is placed, an allocated entry is found by its
// PC with the fields written, the update port changes only the fields of the
// addressed entry, entries are allocated first-in-first-out (the oldest one
// is the one overwritten once the table is full), both write ports work in
// the same cycle, and reset empties the table.
module tb_ipt;
  localparam int DEGREE = 4, ENTRIES = 8, ADDR_W = 32, LINE = 32;
  localparam int OFF_W = $clog2(2 * LINE) + 1;
  localparam int IDX_W = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] pc, rd_pc, wb_pc;
  logic hit, rd_ev, wa_en, wb_en;
  logic [IDX_W-1:0] hit_idx, rd_idx, wa_idx, alloc_idx;
  logic [DEGREE-1:0] hit_v, hit_s, rd_v, rd_s, wa_v, wa_s, wb_v, wb_s;
  logic [DEGREE:1][OFF_W-1:0] hit_off, rd_off, wa_off, wb_off;

  int checks = 0, failures = 0;

  // model
  bit                         m_ev  [ENTRIES];
  logic [ADDR_W-1:0]          m_pc  [ENTRIES];
  logic [DEGREE-1:0]          m_v   [ENTRIES], m_s [ENTRIES];
  logic [DEGREE:1][OFF_W-1:0] m_off [ENTRIES];
  int m_head = 0;

  always #5 clk = ~clk;

  ipt #(.DEGREE(DEGREE), .ENTRIES(ENTRIES), .ADDR_W(ADDR_W), .LINE_BYTES(LINE)) dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL t=%0t: %s", $time, s);
  endtask

  task automatic lookup(input logic [ADDR_W-1:0] a);
    int exp;
    pc = a;
    #1;
    exp = -1;
    for (int i = 0; i < ENTRIES; i++) if (m_ev[i] && m_pc[i] == a && exp < 0) exp = i;
    checks++;
    if (hit != (exp >= 0)) fail($sformatf("hit=%0b for %h", hit, a));
    else if (exp >= 0) begin
      checks++;
      if (int'(hit_idx) != exp || hit_v != m_v[exp] || hit_s != m_s[exp] || hit_off != m_off[exp])
        fail($sformatf("entry contents for %h", a));
    end
  endtask

  task automatic randomize_entry(output logic [DEGREE-1:0] v, output logic [DEGREE-1:0] s,
                                 output logic [DEGREE:1][OFF_W-1:0] off);
    v = DEGREE'($urandom);
    s = DEGREE'($urandom);
    for (int k = 1; k <= DEGREE; k++) off[k] = OFF_W'($urandom);
  endtask

  initial begin
    #100000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] pcs[$];
    wa_en = 0; wb_en = 0; wa_idx = 0; rd_idx = 0;
    wa_v = 0; wa_s = 0; wa_off = 0; wb_pc = 0; wb_v = 0; wb_s = 0; wb_off = 0;
    for (int i = 0; i < ENTRIES; i++) m_ev[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    lookup(32'h100);
    // fill the table and beyond: FIFO replacement
    for (int n = 0; n < 3 * ENTRIES; n++) begin
      @(negedge clk);
      checks++;
      if (int'(alloc_idx) != m_head) fail("alloc_idx is not the FIFO head");
      wb_en = 1;
      wb_pc = 32'h1000 + 32'(n * 7);
      randomize_entry(wb_v, wb_s, wb_off);
      // sometimes update an existing entry in the same cycle
      wa_en = (n > 0) && ($urandom_range(1) == 1);
      wa_idx = IDX_W'((m_head + ENTRIES - 1) % ENTRIES);
      randomize_entry(wa_v, wa_s, wa_off);
      @(posedge clk);
      if (wa_en) begin
        m_v[wa_idx] = wa_v; m_s[wa_idx] = wa_s; m_off[wa_idx] = wa_off;
      end
      m_ev[m_head] = 1; m_pc[m_head] = wb_pc; m_v[m_head] = wb_v; m_s[m_head] = wb_s;
      m_off[m_head] = wb_off;
      m_head = (m_head + 1) % ENTRIES;
      @(negedge clk);
      wb_en = 0; wa_en = 0;
      // the newest entries are found, the evicted one is gone
      lookup(wb_pc);
      if (n >= ENTRIES) lookup(32'h1000 + 32'((n - ENTRIES) * 7));
      lookup(32'h1000 + 32'($urandom_range(n) * 7));
      rd_idx = IDX_W'($urandom_range(ENTRIES - 1));
      #1;
      checks++;
      if (rd_ev != m_ev[rd_idx] || (m_ev[rd_idx] && (rd_pc != m_pc[rd_idx] || rd_v != m_v[rd_idx]
          || rd_s != m_s[rd_idx] || rd_off != m_off[rd_idx])))
        fail("read port");
    end
    // reset empties the table
    rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < ENTRIES; i++) m_ev[i] = 0;
    m_head = 0;
    lookup(32'h1000 + 32'((3 * ENTRIES - 1) * 7));
    checks++;
    if (alloc_idx != 0) fail("FIFO head not reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

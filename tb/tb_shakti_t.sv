// End-to-end test of the Shakti-T pipeline at its default sizes.
//
// Runs one program that walks through the source's worked examples:
// allocating an object and binding a register to its bounds (wrplm, ldbnb),
// pointer arithmetic and aliasing, storing a pointer with its ptr_id, an
// out-of-bounds store (spatial violation), a function call that saves a
// pointer with fnst, allocates and frees a second object, reuses the
// register for data, then a use-after-free through a stale copy of the
// freed pointer (temporal violation) and the restore of the saved pointer
// with fnld. A final loop binds more pointers than the BnBCache holds.
// The program is run once to the end and again to checkpoints (an ebreak
// replaces the instruction at the checkpoint), and the architectural and
// BnBCache state is compared with the values the examples give. Every
// pipeline mechanism is counted and must occur at least once.
module tb_shakti_t;
  import shakti_t_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic        imem_we;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata;
  reg_idx_t    dbg_reg;
  xlen_t       dbg_reg_val;
  logic        dbg_reg_tag, dbg_bnb_iv;
  logic [3:0]  dbg_bnb_idx, dbg_row;
  meta_t       dbg_row_meta;
  logic [9:0]  dbg_mem_addr;
  xlen_t       dbg_mem_data, plbr, bnb_sp, viol_pc, viol_addr;
  logic        dbg_mem_tag, halted;
  logic [31:0] viol_count;
  events_t     ev;

  shakti_t dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [31:0] prog [1024];
  localparam int SP = 5'd10, CNT = 5'd31;
  localparam int MAIN = 0, HANDLER = 'h100, P2 = 'h200, P3 = 'h300;
  int pc_of [string];

  task automatic put(inout int a, input logic [31:0] w, input string label = "");
    prog[a/4] = w;
    if (label != "") pc_of[label] = a;
    a += 4;
  endtask

  task automatic build();
    int a;
    for (int i = 0; i < 1024; i++) prog[i] = ADDI(0, 0, 0);
    // main: allocation of ptr5 = malloc(20) at 100, ptr_id 5
    a = MAIN;
    put(a, LUI(20, 1));                 // x20 = 0x1000: PLM base
    put(a, WRSPREG(20, 0));             // PLBR <= x20
    put(a, ADDI(SP, 0, 'h700));         // untagged stack/frame pointer
    put(a, ADDI(21, 0, 5));             // ptr_id 5
    put(a, ADDI(1, 0, 100));            // malloc returned 100
    put(a, ADDI(22, 1, 20));            // bound = base + n
    put(a, WRPLM(21, 1, 22));           // PLM[5] = {100, 120}
    put(a, LDBNB(1, 21), "bind1");      // R1 bound to {100,120,5}
    put(a, RDSPREG(23, 0));             // x23 = PLBR
    put(a, SD(1, SP, 0));               // store the pointer ...
    put(a, SD(21, SP, 8));              // ... and its ptr_id at addr + 8
    put(a, SB(21, 1, 19));              // last byte of the object: legal
    put(a, LB(24, 1, 19));              // read it back (sign-extended 5)
    put(a, LD(8, SP, 0));               // load-use: x8 = 100, tag from memory
    put(a, ADDI(9, 8, 1));              // x9 = 101, tagged, no bounds
    put(a, ADDI(11, 1, 4));             // pointer arithmetic keeps bounds
    put(a, SUB(12, 11, 1));             // pointer - pointer = 4, data
    put(a, ADDI(4, 1, 0));              // alias of R1
    put(a, LDPTR(3, SP, 0));            // x3 = 100, bound via PLM
    put(a, WRTAG(3, 0));                // x3 made plain data
    put(a, ADDI(13, 0, 120));           // untagged address just past the object
    put(a, ADDI(14, 0, 'h55));
    put(a, SB(14, 13, 0));              // legal: x13 has no bounds
    put(a, ADDI(26, 0, 1), "cp_main");
    put(a, SB(0, 1, 20));               // one past the end: violation
    put(a, ADDI(30, 0, 'h7f));          // must be squashed
    put(a, EBREAK());
    // trap handler: dispatch on the number of traps taken
    a = HANDLER;
    put(a, ADDI(CNT, CNT, 1));
    put(a, ADDI(29, 0, 1));
    put(a, BNE(CNT, 29, 8));
    put(a, JAL(0, P2 - a));
    put(a, ADDI(29, 0, 2));
    put(a, BNE(CNT, 29, 8));
    put(a, JAL(0, P3 - a));
    put(a, EBREAK());
    // P2: call of bar()
    a = P2;
    put(a, FNST(1, SP, 16));            // save R1 (ptr5) with its ptr_id
    put(a, ADDI(2, 0, 200));            // ptr6 = malloc(40) at 200
    put(a, ADDI(24, 0, 6));             // ptr_id 6
    put(a, ADDI(25, 2, 40));            // bound 240
    put(a, WRPLM(24, 2, 25));
    put(a, LDBNB(2, 24), "bind2");      // fig: R2 -> {200,240,6}
    put(a, SD(2, SP, 32));              // a copy of ptr6 in memory
    put(a, SD(24, SP, 40));
    put(a, ADDI(1, 0, 10));             // int c = 10 + 3 in R1
    put(a, ADDI(1, 1, 3), "c13");
    put(a, WRPLM(24, 0, 0), "free");    // free(ptr6)
    put(a, LDPTR(26, SP, 32), "uaf");   // stale copy of ptr6
    put(a, LB(27, 26, 0));              // use after free: violation
    put(a, EBREAK());
    // P3: return to foo()
    a = P3;
    put(a, FNLD(1, SP, 16), "restore"); // R1 <- ptr5, bounds reused
    put(a, LBU(28, 1, 19));             // legal access through R1
    put(a, ADDI(5, 0, 7));              // bind 17 more pointers
    put(a, ADDI(7, 0, 24));
    put(a, LDBNB(6, 5), "loop");
    put(a, ADDI(5, 5, 1));
    put(a, BNE(5, 7, -8));
    put(a, FNLD(1, SP, 16), "reload");  // R1 evicted: bounds from PLM
    put(a, SB(0, 1, 0));
    put(a, EBREAK());
  endtask

  // ---------------------------------------------------------------- running
  int n_retire, n_lu, n_mstall, n_fm, n_fw, n_redir, n_viol, n_check;
  int n_hit, n_alloc, n_evict, n_inval, n_reuse, n_prop, cycles;
  bit counting;

  always @(posedge clk) if (counting && rst_n) begin
    cycles++;
    n_retire += int'(ev.retire);   n_lu    += int'(ev.load_use_stall);
    n_mstall += int'(ev.mem_stall); n_fm   += int'(ev.fwd_mem);
    n_fw     += int'(ev.fwd_wb);    n_redir += int'(ev.redirect);
    n_viol   += int'(ev.violation); n_check += int'(ev.check);
    n_hit    += int'(ev.bnb_hit);   n_alloc += int'(ev.bnb_alloc);
    n_evict  += int'(ev.bnb_evict); n_inval += int'(ev.bnb_inval);
    n_reuse  += int'(ev.fnld_reuse); n_prop += int'(ev.tag_prop);
  end

  task automatic run(input int stop_at, input bit count);
    @(negedge clk);
    rst_n   = 1'b0;
    imem_we = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      imem_waddr = 10'(i);
      imem_wdata = (stop_at >= 0 && i == stop_at / 4) ? EBREAK() : prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    counting = count;
    for (int c = 0; c < 2000 && !halted; c++) @(posedge clk);
    repeat (6) @(posedge clk);  // drain the older instructions
    counting = 1'b0;
    check(halted, $sformatf("program stopped at checkpoint %0d", stop_at));
  endtask

  task automatic reg_is(int r, xlen_t v, bit t, string what);
    dbg_reg = 5'(r);
    #1;
    check(dbg_reg_val == v, $sformatf("%s: x%0d = %0d, expected %0d", what, r, dbg_reg_val, v));
    check(dbg_reg_tag == t, $sformatf("%s: tag of x%0d = %0b, expected %0b", what, r, dbg_reg_tag, t));
  endtask

  // bounds of register r: bound? and, if so, {base, bound, pid}; returns its row
  task automatic bnb_is(int r, bit bound, xlen_t base, xlen_t bnd, xlen_t pid,
                        string what, output int row);
    dbg_reg = 5'(r);
    #1;
    dbg_row = dbg_bnb_idx;
    #1;
    row = int'(dbg_bnb_idx);
    if (!bound) begin
      check(!(dbg_bnb_iv && dbg_row_meta.bv), $sformatf("%s: x%0d must have no bounds", what, r));
    end else begin
      check(dbg_bnb_iv && dbg_row_meta.bv, $sformatf("%s: x%0d must be bound", what, r));
      check(dbg_row_meta.base == base && dbg_row_meta.bound == bnd && dbg_row_meta.pid == pid,
            $sformatf("%s: x%0d bounds {%0d,%0d,%0d}, expected {%0d,%0d,%0d}", what, r,
                      dbg_row_meta.base, dbg_row_meta.bound, dbg_row_meta.pid, base, bnd, pid));
    end
  endtask

  function automatic int rows_with_pid(xlen_t pid);
    int n = 0;
    for (int i = 0; i < BNB_ENTRIES; i++)
      if (dut.u_bnb.lu_v[i] && dut.u_bnb.lu_pid[i] == pid) n++;
    return n;
  endfunction

  task automatic mem_is(int addr, xlen_t v, bit t, string what);
    dbg_mem_addr = 10'(addr / 8);
    #1;
    check(dbg_mem_data == v && dbg_mem_tag == t,
          $sformatf("%s: M[%0h] = %0d/%0b, expected %0d/%0b", what, addr, dbg_mem_data, dbg_mem_tag, v, t));
  endtask

  // ---------------------------------------------------------------- checks
  initial begin
    int row1, row2, row;
    dbg_reg = '0; dbg_row = '0; dbg_mem_addr = '0; counting = 1'b0;
    rst_n = 1'b0; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    build();

    // allocation: R1 = 100 bound to {100,120,5}
    run(pc_of["bind1"] + 4, 0);
    reg_is(1, 100, 1, "after ldbnb");
    bnb_is(1, 1, 100, 120, 5, "after ldbnb", row1);
    check(viol_count == 0, "no violation yet");

    // the rest of main, stopped before the out-of-bounds store
    run(pc_of["cp_main"] + 4, 0);
    check(plbr == 64'h1000, "PLBR written");
    reg_is(23, 64'h1000, 0, "rdspreg");
    reg_is(24, 5, 0, "lb of the last byte");
    reg_is(8, 100, 1, "ld of a stored pointer");
    reg_is(9, 101, 1, "ld pointer + 1");
    bnb_is(9, 0, 0, 0, 0, "ld pointer has no bounds", row);
    reg_is(11, 104, 1, "pointer + 4");
    bnb_is(11, 1, 100, 120, 5, "pointer + 4", row);
    check(row == row1, "pointer + 4 shares R1's row");
    reg_is(12, 4, 0, "pointer - pointer");
    bnb_is(4, 1, 100, 120, 5, "alias", row);
    check(row == row1, "alias shares R1's row");
    check(rows_with_pid(5) == 1, "one row for the aliased pointers");
    reg_is(3, 100, 0, "ldptr then wrtag 0");
    bnb_is(3, 0, 0, 0, 0, "wrtag 0 unbinds", row);
    mem_is('h700, 100, 1, "stored pointer");
    mem_is('h708, 5, 0, "stored ptr_id");
    mem_is('h1050, 100, 0, "PLM[5].base");
    mem_is('h1058, 120, 0, "PLM[5].bound");

    // bar(): ptr6 allocated; ptr5 still bound
    run(pc_of["bind2"] + 4, 0);
    check(viol_count == 1, "spatial violation trapped");
    check(viol_pc == xlen_t'(pc_of["cp_main"] + 4), "violation PC");
    check(viol_addr == 120, "violation address");
    reg_is(30, 0, 0, "instruction after the violation squashed");
    dbg_mem_addr = 10'(120 / 8);
    #1 check(dbg_mem_data[7:0] == 8'h55, "the violating store wrote nothing");
    reg_is(2, 200, 1, "ptr6");
    bnb_is(2, 1, 200, 240, 6, "ptr6", row2);
    bnb_is(1, 1, 100, 120, 5, "ptr5 during bar", row);
    check(row2 != row1, "distinct rows");
    mem_is('h710, 100, 1, "fnst saved the pointer");
    mem_is('h718, 5, 1, "fnst saved ptr_id");

    // R1 reused for data: its row stays valid
    run(pc_of["c13"] + 4, 0);
    reg_is(1, 13, 0, "c = 10 + 3");
    bnb_is(1, 0, 0, 0, 0, "R1 unbound", row);
    check(rows_with_pid(5) == 1, "ptr5's row kept");

    // free(ptr6)
    run(pc_of["free"] + 4, 0);
    reg_is(2, 200, 0, "freed pointer loses its tag");
    bnb_is(2, 0, 0, 0, 0, "freed pointer unbound", row);
    check(rows_with_pid(6) == 0, "ptr6's row invalidated");
    check(rows_with_pid(5) == 1, "ptr5's row kept after free");
    mem_is('h1060, 0, 0, "PLM[6] cleared");

    // return: fnld restores R1 and finds its row again
    run(pc_of["restore"] + 4, 0);
    check(viol_count == 2, "use after free trapped");
    check(viol_addr == 200, "use-after-free address");
    reg_is(1, 100, 1, "restored ptr5");
    bnb_is(1, 1, 100, 120, 5, "restored ptr5", row);
    check(row == row1, "restored into the same row");
    reg_is(26, 200, 1, "stale pointer reloaded");
    bnb_is(26, 1, 0, 0, 6, "stale pointer has empty bounds", row);

    // before the final fnld: R1 was evicted
    run(pc_of["reload"], 0);
    bnb_is(1, 0, 0, 0, 0, "R1 evicted", row);
    reg_is(1, 100, 1, "evicted pointer keeps its tag");
    reg_is(5, 24, 0, "loop count");

    // whole program, counting mechanisms
    n_retire = 0; n_lu = 0; n_mstall = 0; n_fm = 0; n_fw = 0; n_redir = 0; n_viol = 0;
    n_check = 0; n_hit = 0; n_alloc = 0; n_evict = 0; n_inval = 0; n_reuse = 0; n_prop = 0;
    cycles = 0;
    run(-1, 1);
    bnb_is(1, 1, 100, 120, 5, "reloaded ptr5", row);
    reg_is(28, 5, 0, "lbu through the restored pointer");
    check(viol_count == 2, "two violations in the whole run");
    $display("cycles=%0d retired=%0d load_use=%0d mem_stall=%0d fwd_mem=%0d fwd_wb=%0d",
             cycles, n_retire, n_lu, n_mstall, n_fm, n_fw);
    $display("redirect=%0d violation=%0d checks=%0d bnb_hit=%0d alloc=%0d evict=%0d inval=%0d fnld_reuse=%0d tag_prop=%0d",
             n_redir, n_viol, n_check, n_hit, n_alloc, n_evict, n_inval, n_reuse, n_prop);
    check(n_lu > 0, "load-use stall happened");
    check(n_mstall > 0, "multi-cycle memory stall happened");
    check(n_fm > 0, "forwarding from memory stage happened");
    check(n_fw > 0, "forwarding from write-back happened");
    check(n_redir > 0, "branch/trap redirect happened");
    check(n_viol == 2, "both violations happened");
    check(n_check > 0, "bounds checks happened");
    check(n_hit > 0, "BnBCache row reuse happened");
    check(n_alloc > 0, "BnBCache allocation happened");
    check(n_evict > 0, "BnBCache eviction happened");
    check(n_inval > 0, "free invalidation happened");
    check(n_reuse > 0, "fnld reuse of a cached row happened");
    check(n_prop > 0, "tag propagation happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

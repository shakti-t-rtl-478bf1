// End-to-end test of bounds checking on a declared array, at the core's
// default sizes.
//
// The program declares `char a[10]` at 0x300 and records its bounds with
// wrplm (ptr_id 3, base 0x300, bound 0x30a = base + 10). It then binds the
// array register with ldbnb, as is done when an array's base address is
// loaded. It fills the array with a loop that runs one element too far
// (i = 0..10), the classic off-by-one overflow. The loop walks a copy of the
// pointer, so the copy must inherit the bounds through pointer arithmetic.
// The store to a[10] must be refused. It is a violation that redirects to
// the trap vector, where the handler reads c = a[4] and stops. Before the
// loop, the byte a[10] is preset to 0x55 through an untagged register,
// which is not checked.
//
// Checked afterwards:
//   - a[0..9] hold 0..9 and the byte after the array still holds 0x55;
//   - c = 4;
//   - one violation was recorded, at the store's PC and address 0x30a;
//   - the instruction after the faulting store never executed;
//   - eleven bounds checks were made (ten legal stores, one refused) plus
//     the handler's load;
//   - the copy of the pointer stayed bound to the array.
// The program, the addresses and the trap behaviour are this test's own;
// the declare-then-ldbnb sequence and bound = base + n follow the source's
// array example.
module tb_array_access;
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

  `include "tb_check.svh"

  localparam int A = 'h300, N = 10, PID = 3;
  localparam int HANDLER = 'h100;
  localparam xlen_t A_END = xlen_t'(A) + xlen_t'(N);   // one past the last element

  logic [31:0] prog [1024];
  int store_pc, loop_pc;

  task automatic build();
    int a;
    for (int i = 0; i < 1024; i++) prog[i] = ADDI(0, 0, 0);
    a = 0;
    prog[a/4] = LUI(20, 1);            a += 4;  // PLM at 0x1000
    prog[a/4] = WRSPREG(20, 0);        a += 4;
    prog[a/4] = ADDI(1, 0, A);         a += 4;  // a = 0x300 (still data)
    prog[a/4] = ADDI(5, 0, PID);       a += 4;
    prog[a/4] = ADDI(6, 1, N);         a += 4;  // bound = base + 10
    prog[a/4] = WRPLM(5, 1, 6);        a += 4;  // declare the array
    prog[a/4] = ADDI(13, 0, A + N);    a += 4;  // untagged address of a[10]
    prog[a/4] = ADDI(14, 0, 'h55);     a += 4;
    prog[a/4] = SB(14, 13, 0);         a += 4;  // preset the byte past a[]
    prog[a/4] = LDBNB(1, 5);           a += 4;  // bind the array register
    prog[a/4] = ADDI(2, 1, 0);         a += 4;  // p = a (inherits bounds)
    prog[a/4] = ADDI(3, 0, 0);         a += 4;  // i = 0
    prog[a/4] = ADDI(12, 0, N + 1);    a += 4;  // loop runs to i = 10
    loop_pc = a;
    store_pc = a;
    prog[a/4] = SB(3, 2, 0);           a += 4;  // *p = i
    prog[a/4] = ADDI(2, 2, 1);         a += 4;  // p++
    prog[a/4] = ADDI(3, 3, 1);         a += 4;  // i++
    prog[a/4] = BNE(3, 12, loop_pc - a); a += 4;
    prog[a/4] = ADDI(15, 0, 1);        a += 4;  // never reached
    prog[a/4] = EBREAK();              a += 4;
    // violation handler: c = a[4]
    a = HANDLER;
    prog[a/4] = LB(8, 1, 4);           a += 4;
    prog[a/4] = ADDI(9, 8, 0);         a += 4;  // use of the load
    prog[a/4] = EBREAK();              a += 4;
  endtask

  int n_check, n_viol;
  bit counting;
  always @(posedge clk) if (counting && rst_n) begin
    n_check += int'(ev.check);
    n_viol  += int'(ev.violation);
  end

  task automatic reg_is(int r, xlen_t v, string what);
    dbg_reg = 5'(r);
    #1;
    check(dbg_reg_val == v, $sformatf("%s: x%0d = %0h, expected %0h", what, r, dbg_reg_val, v));
  endtask

  function automatic logic [7:0] byte_at(int addr);
    return dbg_mem_data[8*(addr%8) +: 8];
  endfunction

  task automatic mem_byte_is(int addr, logic [7:0] v, string what);
    dbg_mem_addr = 10'(addr / 8);
    #1;
    check(byte_at(addr) == v, $sformatf("%s: byte %0h = %0h, expected %0h", what, addr, byte_at(addr), v));
  endtask

  initial begin
    dbg_reg = '0; dbg_row = '0; dbg_mem_addr = '0;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    rst_n = 1'b0; counting = 1'b0;
    build();
    @(negedge clk);
    imem_we = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      imem_waddr = 10'(i);
      imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    counting = 1'b1;
    for (int c = 0; c < 1000 && !halted; c++) @(posedge clk);
    repeat (6) @(posedge clk);
    counting = 1'b0;
    @(negedge clk);

    check(halted, "program reached the handler's ebreak");
    for (int i = 0; i < N; i++) mem_byte_is(A + i, 8'(i), $sformatf("a[%0d]", i));
    mem_byte_is(A + N, 8'h55, "byte past the array untouched");
    reg_is(8, 4, "c = a[4]");
    reg_is(9, 4, "copy of c");
    reg_is(15, 0, "instruction after the overflow not executed");
    reg_is(3, xlen_t'(N), "loop stopped at i = 10");
    reg_is(2, A_END, "pointer at a + 10");
    check(viol_count == 1, $sformatf("one violation, got %0d", viol_count));
    check(n_viol == 1, "one violation strobe");
    check(viol_addr == A_END, $sformatf("violation address %0h", viol_addr));
    check(viol_pc == xlen_t'(store_pc), $sformatf("violation pc %0h, expected %0h", viol_pc, store_pc));
    check(n_check == N + 2, $sformatf("bounds checks %0d, expected %0d", n_check, N + 2));
    dbg_reg = 5'd2;
    #1;
    dbg_row = dbg_bnb_idx;
    #1;
    check(dbg_reg_tag && dbg_bnb_iv && dbg_row_meta.bv, "walking pointer still bound");
    check(dbg_row_meta.base == xlen_t'(A) && dbg_row_meta.bound == A_END
          && dbg_row_meta.pid == xlen_t'(PID), "walking pointer has the array's bounds");
    check(plbr == xlen_t'('h1000), "PLBR set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

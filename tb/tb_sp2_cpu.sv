// tb_sp2_cpu: end-to-end self-check of the SP-2 CPU at its default size.
//
// The testbench loads programs through the loader port (rom_we, phy_address,
// rom_data) with pc_enable low, then runs the CPU and checks it against an
// instruction-level reference model written here from the instruction set:
// after every clock the PC, all eight registers, the three flags, the I/O
// strobes and every cell of the 2 x 20 display must agree with the model.
//
// Phase 1 runs a directed program with a known result: it exercises ALU
// register and immediate modes, all five addressing modes, taken and not
// taken branches, an ignored CPU write to R7, ACCEPT_INPUT without and with
// input (jump to the handler at 01), PRINT_OUTPUT and PRINT_CLEAR, and the
// display must end as "9:". Phase 2 runs random programs over the whole
// instruction set with random switch settings.
//
// Every mechanism is counted (each ALU operation in both modes, each branch
// taken and not taken, each load/store mode, accept with and without input,
// print, clear, divide-by-zero and multiply overflow, carry, display wrap and
// scroll) and one that never happened counts as a failure.
module tb_sp2_cpu;
  import sp2_pkg::*;

  localparam int ROWS = 2, COLS = 20;

  logic clk = 0, rst, pc_enable, rom_we;
  logic [12:0] rom_data;
  logic [6:0] phy_address;
  logic [3:0] switches;
  logic [6:0] log_address;
  logic [31:0] log_r;
  logic cf, sf, zf, dive, mule, int_input_avail, int_input_sel, int_print_en, int_print_clr;
  logic [3:0] int_output_data;
  logic [6:0] tty_char;
  logic [ROWS-1:0][COLS-1:0][6:0] tty_screen;
  logic [0:0] tty_row;
  logic [4:0] tty_col;

  sp2_cpu dut (
    .clk(clk), .rst(rst), .pc_enable(pc_enable), .rom_we(rom_we), .rom_data(rom_data),
    .phy_address(phy_address), .switches(switches), .log_address(log_address),
    .log_r(log_r), .cf(cf), .sf(sf), .zf(zf), .dive(dive), .mule(mule),
    .int_input_avail(int_input_avail), .int_input_sel(int_input_sel),
    .int_print_en(int_print_en), .int_print_clr(int_print_clr),
    .int_output_data(int_output_data), .tty_char(tty_char), .tty_screen(tty_screen),
    .tty_row(tty_row), .tty_col(tty_col));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ assembler
  function automatic logic [12:0] alu_r(int fn, int ra, int rb);
    return {2'b00, 4'(fn), 3'(ra), 3'(rb), 1'b0};
  endfunction
  function automatic logic [12:0] alu_i(int fn, int ra, int imm);
    return {2'b01, 4'(fn), 3'(ra), 4'(imm)};
  endfunction
  function automatic logic [12:0] br(int fn, int addr);
    return {2'b10, 4'(fn), 7'(addr)};
  endfunction
  function automatic logic [12:0] mem_a(int fn, int ra, int a4);
    return {2'b11, 4'(fn), 3'(ra), 4'(a4)};
  endfunction
  function automatic logic [12:0] mem_r(int fn, int ra, int rb);
    return {2'b11, 4'(fn), 3'(ra), 3'(rb), 1'b0};
  endfunction
  function automatic logic [12:0] mem_b(int fn, int ra, int rb2, int d2);
    return {2'b11, 4'(fn), 3'(ra), 2'(rb2), 2'(d2)};
  endfunction
  function automatic logic [12:0] io(int fn);
    return {2'b11, 4'(fn), 7'd0};
  endfunction

  // ------------------------------------------------------ reference model
  logic [12:0] prog [128];
  logic [12:0] mmem [128];
  int  mpc, mcf, msf, mzf;
  int  mr [8];
  logic [6:0] scr [ROWS][COLS];
  int  srow, scol;
  int  exp_print, exp_clr, exp_isel;
  logic [6:0] exp_char;

  // mechanism counters
  int n_alu [2][16];
  int n_taken [7], n_not [7];
  int n_ld [3], n_st [3];
  int n_acc_in = 0, n_acc_none = 0, n_print = 0, n_clear = 0;
  int n_r7_ignored = 0, n_dive = 0, n_mule = 0, n_carry = 0, n_wrap = 0, n_scroll = 0;
  string printed = "";

  function automatic void scr_clear();
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) scr[r][c] = 7'h20;
    srow = 0; scol = 0;
  endfunction

  function automatic void scr_put(logic [6:0] x);
    if (scol == COLS) begin
      if (srow == ROWS - 1) begin
        n_scroll++;
        for (int r = 0; r < ROWS - 1; r++) for (int c = 0; c < COLS; c++) scr[r][c] = scr[r+1][c];
        for (int c = 0; c < COLS; c++) scr[ROWS-1][c] = 7'h20;
      end else begin
        n_wrap++;
        srow++;
      end
      scol = 0;
    end
    scr[srow][scol] = x;
    scol++;
  endfunction

  function automatic void model_reset();
    mpc = 0; mcf = 0; msf = 0; mzf = 0;
    for (int i = 0; i < 8; i++) mr[i] = 0;
    scr_clear();
  endfunction

  // ALU of the instruction set: returns result, sets carry/borrow.
  function automatic int alu_ref(int fn, int a, int b, output int c);
    int s = b % 4;
    c = 0;
    case (fn)
      0: return a & b;
      1: return a | b;
      2: return a ^ b;
      3: return 15 - a;
      4: return (a << s) % 16;
      5: return a >> s;
      6: begin if (b == 0) begin n_dive++; return 0; end return a / b; end
      7: begin if (a * b > 15) n_mule++; return (a * b) % 16; end
      8, 12: begin c = (a < b); return (a - b + 16) % 16; end
      9: begin c = (a + b > 15); return (a + b) % 16; end
      10: return ((a << s) | (a >> (4 - s))) % 16;
      11: return ((a >> s) | (a << (4 - s))) % 16;
      default: return 0;
    endcase
  endfunction

  function automatic void wreg(int idx, int v);
    if (idx == 7) n_r7_ignored++;
    else mr[idx] = v % 16;
  endfunction

  // Execute one instruction of the model with the given switch value.
  function automatic void model_step(int sw);
    logic [12:0] ins = mmem[mpc];
    int t = ins[12:11], fn = ins[10:7], ra = ins[6:4], rb = ins[3:1], imm = ins[3:0];
    int res, c, addr, taken;
    int npc = (mpc + 1) % 128;
    exp_print = 0; exp_clr = 0; exp_isel = 0;
    if (t <= 1) begin
      int b = (t == 1) ? imm : mr[rb];
      if (fn <= 12) begin
        n_alu[t][fn]++;
        res = alu_ref(fn, mr[ra], b, c);
        mcf = c; msf = (res >= 8); mzf = (res == 0);
        if (c) n_carry++;
        if (fn != 12) wreg(ra, res);
      end
    end else if (t == 2) begin
      case (fn)
        0: taken = 1;
        1: taken = mzf;
        2: taken = !mzf;
        3: taken = !mzf && msf;
        4: taken = msf || mzf;
        5: taken = !mzf && !msf;
        6: taken = mcf;
        default: taken = 0;
      endcase
      if (fn <= 6) begin
        if (taken) n_taken[fn]++; else n_not[fn]++;
      end
      if (taken) npc = ins[6:0];
    end else begin
      case (fn)
        0, 3: addr = imm;
        1, 4: addr = mr[rb];
        2, 5: addr = (mr[ins[3:2]] + ins[1:0]) % 16;
        default: addr = 0;
      endcase
      case (fn)
        0, 1, 2: begin n_ld[fn]++; wreg(ra, mmem[addr] % 16); end
        3, 4, 5: begin n_st[fn-3]++; mmem[addr] = 13'(mr[ra]); end
        13: if (sw != 0) begin
              n_acc_in++; mr[7] = sw; npc = 1; exp_isel = 1;
            end else n_acc_none++;
        14: begin
              n_print++; exp_print = 1; exp_char = 7'(mr[6] + 'h30);
              printed = $sformatf("%s%c", printed, exp_char);
              scr_put(exp_char);
            end
        15: begin n_clear++; exp_clr = 1; scr_clear(); end
        default: ;
      endcase
    end
    mpc = npc;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s (cycle %0d, pc=%0d)", what, cycles, log_address);
    end
  endtask

  task automatic compare_state();
    int bad = 0;
    check(int'(log_address) == mpc, "PC");
    for (int i = 0; i < 8; i++) check(int'(log_r[i*4 +: 4]) == mr[i], $sformatf("R%0d", i));
    check({cf, sf, zf} == {1'(mcf), 1'(msf), 1'(mzf)}, "flags");
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      if (tty_screen[r][c] != scr[r][c]) bad++;
    check(bad == 0 && int'(tty_row) == srow && int'(tty_col) == scol, "display");
  endtask

  task automatic load_program();
    pc_enable = 0; rst = 1;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 128; i++) begin
      rom_we = 1; phy_address = 7'(i); rom_data = prog[i];
      @(posedge clk); #1;
      mmem[i] = prog[i];
    end
    rom_we = 0;
    model_reset();
    compare_state();
  endtask

  // One CPU cycle in lockstep with the model.
  task automatic run_cycle(int sw);
    switches = 4'(sw);
    pc_enable = 1;
    #1;
    model_step(sw);
    check(int_print_en == 1'(exp_print) && int_print_clr == 1'(exp_clr) &&
          int_input_sel == 1'(exp_isel), "I/O strobes");
    if (exp_print) check(tty_char == exp_char, "TTY character");
    check(int_input_avail == (sw != 0), "INT_INPUT_AVAIL");
    @(posedge clk); #1;
    cycles++;
    compare_state();
  endtask

  function automatic logic [12:0] random_instr();
    int k = $urandom_range(0, 99);
    if (k < 30) return alu_r($urandom_range(0, 12), $urandom_range(0, 7), $urandom_range(0, 7));
    if (k < 55) return alu_i($urandom_range(0, 12), $urandom_range(0, 7), $urandom_range(0, 15));
    if (k < 72) return br($urandom_range(0, 6), $urandom_range(0, 127));
    if (k < 90) begin
      int f = $urandom_range(0, 5);
      return {2'b11, 4'(f), 7'($urandom)};
    end
    if (k < 98) return io($urandom_range(13, 15));
    return 13'($urandom);
  endfunction

  initial begin
    rst = 1; pc_enable = 0; rom_we = 0; rom_data = 0; phy_address = 0; switches = 0;
    for (int i = 0; i < 2; i++) for (int f = 0; f < 16; f++) n_alu[i][f] = 0;
    for (int i = 0; i < 7; i++) begin n_taken[i] = 0; n_not[i] = 0; end
    for (int i = 0; i < 3; i++) begin n_ld[i] = 0; n_st[i] = 0; end

    // ---------------------------------------------------- phase 1: directed
    for (int i = 0; i < 128; i++) prog[i] = br(0, i);   // every unused word: JMP to itself
    prog[0]  = br(0, 16);                // JMP main
    prog[1]  = br(0, 48);                // input interrupt vector: JMP handler
    prog[16] = alu_i(9, 0, 3);           // ADD  R0, 3
    prog[17] = alu_i(9, 1, 2);           // ADD  R1, 2
    prog[18] = alu_r(7, 0, 1);           // MUL  R0, R1        R0 = 6
    prog[19] = alu_i(0, 6, 0);           // AND  R6, 0
    prog[20] = alu_r(1, 6, 0);           // OR   R6, R0        R6 = 6
    prog[21] = io(14);                   // PRINT_OUTPUT       '6'
    prog[22] = mem_a(3, 0, 5);           // STORE [5], R0
    prog[23] = alu_i(9, 2, 1);           // ADD  R2, 1
    prog[24] = mem_b(5, 1, 2, 3);        // STORE [R2+3], R1   mem[4] = 2
    prog[25] = mem_b(2, 3, 2, 3);        // LOAD  R3, [R2+3]   R3 = 2
    prog[26] = mem_a(0, 4, 5);           // LOAD  R4, [5]      R4 = 6
    prog[27] = alu_i(9, 5, 5);           // ADD  R5, 5
    prog[28] = mem_r(4, 1, 5);           // STORE [R5], R1     mem[5] = 2
    prog[29] = mem_r(1, 6, 5);           // LOAD  R6, [R5]     R6 = 2
    prog[30] = io(14);                   // PRINT_OUTPUT       '2'
    prog[31] = alu_r(12, 4, 3);          // CMP  R4, R3        6 - 2
    prog[32] = br(1, 40);                // JE   40            not taken
    prog[33] = br(5, 35);                // JG   35            taken
    prog[34] = io(15);                   // (skipped)
    prog[35] = alu_r(12, 3, 4);          // CMP  R3, R4        2 - 6: SF, CF
    prog[36] = br(6, 38);                // JC   38            taken
    prog[37] = io(15);                   // (skipped)
    prog[38] = alu_i(9, 7, 9);           // ADD  R7, 9         ignored: R7 is input only
    prog[39] = io(13);                   // ACCEPT_INPUT       no input: falls through
    prog[40] = io(13);                   // wait: ACCEPT_INPUT
    prog[41] = br(0, 40);                //       JMP wait
    prog[48] = alu_i(0, 6, 0);           // handler: AND R6, 0
    prog[49] = alu_r(1, 6, 7);           // OR   R6, R7        R6 = input
    prog[50] = io(14);                   // PRINT_OUTPUT       '9'
    prog[51] = io(15);                   // PRINT_CLEAR
    prog[52] = io(14);                   // PRINT_OUTPUT       '9'
    prog[53] = alu_i(9, 6, 1);           // ADD  R6, 1
    prog[54] = io(14);                   // PRINT_OUTPUT       ':'
    prog[55] = br(0, 55);                // halt: JMP halt
    load_program();
    printed = "";
    for (int n = 0; n < 70; n++) begin
      // the switches come on while the program is in its wait loop
      run_cycle((n >= 34 && n < 37) ? 9 : 0);
    end
    check(printed == "6299:", $sformatf("printed sequence \"%s\"", printed));
    check(tty_screen[0][0] == 7'h39 && tty_screen[0][1] == 7'h3a && tty_screen[0][2] == 7'h20,
          "final display \"9:\"");
    check(int'(log_address) == 55, "program reached its end");
    check(log_r[3*4 +: 4] == 4'd2 && log_r[4*4 +: 4] == 4'd6 && log_r[6*4 +: 4] == 4'd10 &&
          log_r[7*4 +: 4] == 4'd9, "final registers");
    check(n_acc_in == 1, "one input interrupt taken");

    // ------------------------------------------------- phase 2: random programs
    for (int p = 0; p < 12; p++) begin
      for (int i = 0; i < 128; i++) prog[i] = random_instr();
      load_program();
      for (int n = 0; n < 1500; n++)
        run_cycle(($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 15)) : 0);
    end

    // ------------------------------------------------------- coverage
    for (int t = 0; t < 2; t++)
      for (int f = 0; f <= 12; f++) check(n_alu[t][f] > 0, $sformatf("ALU type %0d op %0d used", t, f));
    for (int f = 0; f < 7; f++) begin
      check(n_taken[f] > 0, $sformatf("branch %0d taken", f));
      if (f != 0) check(n_not[f] > 0, $sformatf("branch %0d not taken", f));
    end
    for (int m = 0; m < 3; m++) begin
      check(n_ld[m] > 0, $sformatf("load mode %0d", m));
      check(n_st[m] > 0, $sformatf("store mode %0d", m));
    end
    check(n_acc_in > 0, "accept with input");
    check(n_acc_none > 0, "accept without input");
    check(n_print > 0, "print");
    check(n_clear > 0, "clear");
    check(n_r7_ignored > 0, "write to R7 ignored");
    check(n_dive > 0, "divide by zero");
    check(n_mule > 0, "multiply overflow");
    check(n_carry > 0, "carry/borrow");
    check(n_wrap > 0, "display row wrap");
    check(n_scroll > 0, "display scroll");
    $display("cycles=%0d prints=%0d clears=%0d interrupts=%0d waits=%0d loads=%0d/%0d/%0d stores=%0d/%0d/%0d wraps=%0d scrolls=%0d",
             cycles, n_print, n_clear, n_acc_in, n_acc_none, n_ld[0], n_ld[1], n_ld[2],
             n_st[0], n_st[1], n_st[2], n_wrap, n_scroll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

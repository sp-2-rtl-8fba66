// sp2_cpu: the SP-2 CPU, a 4-bit single-cycle processor with switch input and a TTY.
//
// Every enabled clock edge completes one 13-bit instruction. The PC addresses
// the 128 x 13 memory, whose first read port returns the instruction; the
// control unit decodes its opcode (bits 12:7) and the datapath does the rest
// within the same cycle:
//   - register set read ports: Ra = bits 6:4, Rb = bits 3:1, or 0 & bits 3:2
//     in based indexed mode (Based_Indexed_Sel);
//   - ALU A = register A, or the zero-extended 2-bit displacement (bits 1:0)
//     in based indexed mode; ALU B = register B, or bits 3:0 in immediate mode;
//   - the ALU result, or the low 4 bits of the second memory read port on a
//     LOAD (LD_EN), is written to register bits 6:4 (REG_EN);
//   - load/store address (LD_Sel / ST_Sel): 01 direct (bits 3:0), 10 register
//     indirect (the value of RB, taken at ALU input B), 11 based indexed (the
//     ALU result RB + displacement); each zero-extended to 7 bits;
//   - store data is register A, zero-extended to 13 bits;
//   - branches load bits 6:0 into the PC; ACCEPT_INPUT with a switch on loads
//     the switches into R7 and sends the PC to address 01;
//   - R6 drives the TTY through an adder that adds ASCII '0' (0x30) to it;
//     PRINT_OUTPUT writes that character, PRINT_CLEAR clears the screen.
// Program loading: with pc_enable low, rom_we writes rom_data into the memory
// at phy_address (the memory's write port, as in the document, where the
// store address selector's input 00 and the write-data selector carry the
// external address and instruction).
// Interface: clk, synchronous active-high rst (PC, registers, flags and
// screen to zero/blank), pc_enable (the document's "PC Enable": the CPU
// advances only while it is high), four switches, and observation outputs
// (PC as log_address, all registers as log_r, flags, ALU error bits, the
// I/O strobes and the TTY screen).
// Structure, names and encodings follow the document's figure and tables.
// This design's choices: the reset; CPU writes (registers, flags, memory,
// TTY) are qualified by pc_enable instead of gating the clock; the loader's
// rom_we also forces the write address and data selectors to the loader so
// that loading does not depend on the instruction at the PC; the read address
// selector's unused input 00 reads address 0. The memory's data addresses are
// 4 bits wide, so LOAD and STORE reach only addresses 0..15, which the program
// shares.
module sp2_cpu
  import sp2_pkg::*;
#(
  parameter int unsigned TTY_ROWS = 2,
  parameter int unsigned TTY_COLS = 20,
  localparam int unsigned TRB = (TTY_ROWS > 1) ? $clog2(TTY_ROWS) : 1,
  localparam int unsigned TCB = $clog2(TTY_COLS + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic                                  pc_enable,
  // program loader
  input  logic                                  rom_we,
  input  logic [IW-1:0]                         rom_data,
  input  logic [AW-1:0]                         phy_address,
  // input device
  input  logic [DW-1:0]                         switches,
  // observation
  output logic [AW-1:0]                         log_address,
  output logic [NREG*DW-1:0]                    log_r,
  output logic                                  cf,
  output logic                                  sf,
  output logic                                  zf,
  output logic                                  dive,
  output logic                                  mule,
  output logic                                  int_input_avail,
  output logic                                  int_input_sel,
  output logic                                  int_print_en,
  output logic                                  int_print_clr,
  output logic [DW-1:0]                         int_output_data,
  output logic [6:0]                            tty_char,
  output logic [TTY_ROWS-1:0][TTY_COLS-1:0][6:0] tty_screen,
  output logic [TRB-1:0]                        tty_row,
  output logic [TCB-1:0]                        tty_col
);

  // ---------------------------------------------------------------- fetch
  logic [AW-1:0] pc;
  logic [IW-1:0] instr;
  logic [IW-1:0] ld_word;
  ctrl_t         ctrl;

  // ------------------------------------------------------------- datapath
  logic [RW-1:0] rb_idx;
  logic [DW-1:0] reg_a, reg_b;
  logic [DW-1:0] alu_a, alu_b, alu_r;
  logic          alu_cf, alu_sf, alu_zf;
  logic [DW-1:0] wrd;
  logic [AW-1:0] ld_st_ad, ld_st_ad2, ld_st_ad3;
  logic [AW-1:0] ram_rad, ram_wad;
  logic [IW-1:0] ram_wd;
  logic          ram_we;

  assign log_address = pc;

  sp2_pc u_pc (
    .clk           (clk),
    .rst           (rst),
    .en            (pc_enable),
    .jmp_sel       (ctrl.jmp_sel),
    .int_input_sel (ctrl.int_input_sel),
    .jmp_addr      (instr[6:0]),
    .pc            (pc)
  );

  sp2_sram #(.DEPTH(1 << AW), .WIDTH(IW)) u_sram (
    .clk (clk),
    .ra1 (pc),
    .rd1 (instr),
    .ra2 (ram_rad),
    .rd2 (ld_word),
    .wa  (ram_wad),
    .wd  (ram_wd),
    .we  (ram_we)
  );

  sp2_control u_ctrl (
    .opcode          (instr[12:7]),
    .zf              (zf),
    .sf              (sf),
    .cf              (cf),
    .int_input_avail (int_input_avail),
    .ctrl            (ctrl)
  );

  assign rb_idx = ctrl.bi_sel ? {1'b0, instr[3:2]} : instr[3:1];

  sp2_regset u_regs (
    .clk      (clk),
    .rst      (rst),
    .ra       (instr[6:4]),
    .rb       (rb_idx),
    .wr       (instr[6:4]),
    .wrd      (wrd),
    .reg_en   (ctrl.reg_en && pc_enable),
    .in_rdata (switches),
    .in_r_en  (ctrl.int_input_sel && pc_enable),
    .a        (reg_a),
    .b        (reg_b),
    .out_rd   (int_output_data),
    .log_r    (log_r)
  );

  assign alu_a = ctrl.bi_sel  ? {2'b00, instr[1:0]} : reg_a;
  assign alu_b = ctrl.imm_sel ? instr[3:0]          : reg_b;

  sp2_alu u_alu (
    .op   (ctrl.op),
    .a    (alu_a),
    .b    (alu_b),
    .r    (alu_r),
    .cf   (alu_cf),
    .sf   (alu_sf),
    .zf   (alu_zf),
    .dive (dive),
    .mule (mule)
  );

  sp2_flag_reg u_flags (
    .clk   (clk),
    .rst   (rst),
    .load  (ctrl.flag_en && pc_enable),
    .cf_in (alu_cf),
    .sf_in (alu_sf),
    .zf_in (alu_zf),
    .cf    (cf),
    .sf    (sf),
    .zf    (zf)
  );

  assign wrd = ctrl.ld_en ? ld_word[DW-1:0] : alu_r;

  // ------------------------------------------------------ memory addressing
  assign ld_st_ad  = AW'(instr[3:0]);  // direct
  assign ld_st_ad2 = AW'(alu_b);       // register indirect: RB
  assign ld_st_ad3 = AW'(alu_r);       // based indexed: RB + disp

  always_comb begin
    unique case (ctrl.ld_sel)
      AS_DIR:  ram_rad = ld_st_ad;
      AS_IND:  ram_rad = ld_st_ad2;
      AS_BIX:  ram_rad = ld_st_ad3;
      default: ram_rad = '0;
    endcase
  end

  always_comb begin
    if (rom_we) begin
      ram_wad = phy_address;
    end else begin
      unique case (ctrl.st_sel)
        AS_DIR:  ram_wad = ld_st_ad;
        AS_IND:  ram_wad = ld_st_ad2;
        AS_BIX:  ram_wad = ld_st_ad3;
        default: ram_wad = phy_address;
      endcase
    end
  end

  assign ram_wd = rom_we ? rom_data : IW'(reg_a);
  assign ram_we = rom_we || (ctrl.ram_en && pc_enable);

  // -------------------------------------------------------------- I/O
  assign int_input_avail = |switches;
  assign int_input_sel   = ctrl.int_input_sel && pc_enable;
  assign int_print_en    = ctrl.int_print_en  && pc_enable;
  assign int_print_clr   = ctrl.int_print_clr && pc_enable;
  assign tty_char        = 7'(int_output_data) + ASCII_BASE;

  sp2_tty #(.ROWS(TTY_ROWS), .COLS(TTY_COLS)) u_tty (
    .clk    (clk),
    .rst    (rst),
    .we     (int_print_en),
    .clr    (int_print_clr),
    .ch     (tty_char),
    .screen (tty_screen),
    .row    (tty_row),
    .col    (tty_col)
  );

endmodule

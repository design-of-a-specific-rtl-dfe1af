// AES-128 crypto ASIP core: an accumulator processor on a 17-bit common bus
// whose instruction set adds the four AES round transformations (SubBytes,
// ShiftRows, MixColumns, AddRoundKey) to a small general instruction set.
//
// Registers on the common bus: AR and PC (12 bits), DR and IR (17 bits),
// the register bank TR0..TR5 (17 bits), the accumulator AC0 (8 bits, an ALU
// operand loaded from the bus), OUTR (8 bits, drives out_port) and the T
// pointer of the SubBytes ROM. AC1 (8 bits) is the accumulator of the
// instruction set and takes the ALU result; E and OV are the ALU's carry and
// overflow flags. IAR holds an address read from memory for the indirect
// instructions LIA and SIA. INPR (8 bits) samples the Cipher-in port, or the
// Key input port, when an INPUT instruction runs. FGI and FGO are the input
// and output flags: the outside sets them with fgi_set / fgo_set (a new
// input byte is ready / the last output byte was taken), INPUT clears FGI
// and OUTPUT clears FGO. FGO resets to 1, FGI to 0. Values narrower than
// the bus are zero-extended onto it; narrower registers take its low bits.
//
// The memory is outside the core (address_bus, data_bus_out, data_bus_in,
// rw_m = 1 for a write, en_m = 1 for any access) and must return read data
// combinationally: a transfer such as DR <- M[AR] completes in one clock.
// The control unit sequences everything; see control_unit for the clocks
// each instruction takes. The register set, widths and buses follow the
// processor's second register configuration; the flag conventions, the INPR
// port selection, the reset values and the memory timing are this design's.
module aes_asip
  import aes_asip_pkg::*;
#(
  parameter int unsigned ADDR_W     = 12,
  parameter int unsigned DATA_W     = 17,
  parameter logic [11:0] STATE_BASE = 12'hF00
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              running,
  input  logic [7:0]        key_in,
  input  logic [7:0]        cipher_in,
  output logic [7:0]        out_port,
  input  logic              fgi_set,
  input  logic              fgo_set,
  output logic              fgi,
  output logic              fgo,
  output logic [ADDR_W-1:0] address_bus,
  output logic [DATA_W-1:0] data_bus_out,
  input  logic [DATA_W-1:0] data_bus_in,
  output logic              rw_m,
  output logic              en_m,
  output logic              fetch        // first clock of each instruction
);

  ctrl_t  ctrl;
  flags_t flags;

  logic [ADDR_W-1:0] ar, pc, iar;
  logic [DATA_W-1:0] dr, ir, bus;
  logic [7:0]        ac0, ac1, inpr, outr, rom_q;
  logic              e, ov;
  logic [NUM_TR-1:0][DATA_W-1:0] tr;

  logic [7:0] alu_a, alu_y;
  logic       alu_e, alu_ov;

  // ---------------- control ----------------
  control_unit #(
    .DATA_W(DATA_W), .STATE_BASE(STATE_BASE)
  ) u_cu (
    .clk, .rst, .start, .ir, .flags, .ctrl, .running, .fetch
  );

  assign flags = '{
    ac_zero: ac1 == '0,
    ac_sign: ac1[7],
    e:       e,
    ov:      ov,
    fgi:     fgi,
    fgo:     fgo,
    dr_zero: dr == '0
  };

  // ---------------- memory buses ----------------
  assign address_bus  = ctrl.addr_iar ? iar : ar;
  assign data_bus_out = bus;
  assign rw_m         = ctrl.mem_we;
  assign en_m         = ctrl.mem_we | ctrl.mem_rd;

  // ---------------- common bus ----------------
  always_comb begin
    unique case (ctrl.bus_sel)
      BUS_MEM:   bus = data_bus_in;
      BUS_AR:    bus = DATA_W'(ar);
      BUS_PC:    bus = DATA_W'(pc);
      BUS_DR:    bus = dr;
      BUS_AC1:   bus = DATA_W'(ac1);
      BUS_IR:    bus = ir;
      BUS_TR:    bus = tr[ctrl.bus_tr];
      BUS_ROM:   bus = DATA_W'(rom_q);
      BUS_CONST: bus = ctrl.bus_const;
      default:   bus = '0;
    endcase
  end

  // ---------------- ALU ----------------
  always_comb begin
    unique case (ctrl.alu_a)
      A_AC0:   alu_a = ac0;
      A_INPR:  alu_a = inpr;
      default: alu_a = ac1;
    endcase
  end

  gf_alu #(.W(8)) u_alu (
    .op(ctrl.alu_op), .a(alu_a), .b(dr[7:0]), .e_in(e),
    .y(alu_y), .e_out(alu_e), .ov_out(alu_ov)
  );

  // ---------------- register bank and SubBytes ROM ----------------
  reg_bank #(.N(NUM_TR), .DATA_W(DATA_W)) u_bank (
    .clk, .rst, .ld(ctrl.ld_tr), .inc(ctrl.inc_tr), .d(bus), .q(tr)
  );

  sbox_rom u_rom (
    .clk, .rst, .tptr_ld(ctrl.ld_tptr), .tptr_d(bus[7:0]), .dout(rom_q)
  );

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ar   <= '0;
      pc   <= '0;
      iar  <= '0;
      dr   <= '0;
      ir   <= '0;
      ac0  <= '0;
      ac1  <= '0;
      inpr <= '0;
      outr <= '0;
      e    <= 1'b0;
      ov   <= 1'b0;
      fgi  <= 1'b0;
      fgo  <= 1'b1;
    end else begin
      if (ctrl.ld_ar)       ar <= bus[ADDR_W-1:0];
      else if (ctrl.inc_ar) ar <= ar + 1'b1;

      if (ctrl.ld_pc)       pc <= bus[ADDR_W-1:0];
      else if (ctrl.inc_pc) pc <= pc + 1'b1;

      if (ctrl.ld_dr)       dr <= bus;
      else if (ctrl.inc_dr) dr <= dr + 1'b1;

      if (ctrl.ld_ir)   ir   <= bus;
      if (ctrl.ld_iar)  iar  <= data_bus_in[ADDR_W-1:0];
      if (ctrl.ld_ac0)  ac0  <= bus[7:0];
      if (ctrl.ld_outr) outr <= bus[7:0];
      if (ctrl.ld_inpr) inpr <= ctrl.inpr_key ? key_in : cipher_in;
      if (ctrl.ld_ac1)  ac1  <= alu_y;

      if (ctrl.clr_e)     e <= 1'b0;
      else if (ctrl.cme)  e <= ~e;
      else if (ctrl.ld_e) e <= alu_e;

      if (ctrl.clr_ov)     ov <= 1'b0;
      else if (ctrl.ld_ov) ov <= alu_ov;

      if (fgi_set)           fgi <= 1'b1;
      else if (ctrl.clr_fgi) fgi <= 1'b0;

      if (fgo_set)           fgo <= 1'b1;
      else if (ctrl.clr_fgo) fgo <= 1'b0;
    end
  end

  assign out_port = outr;

  // A memory write and a memory read never share a clock.
  a_mem_excl: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.mem_we && ctrl.mem_rd));

endmodule

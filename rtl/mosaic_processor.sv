// mosaic_processor: the version B Mosaic processor - controller, datapath and
// ports around one 16-bit internal bus.
//
// Every microcycle one or more units drive the bus and any number load from
// it. The bus is precharged: with no source it reads all ones, and several
// sources together give the AND of their values. Sources are the ALU/shifter
// output W, the status word {C,V,N,Z,PC<11:0>}, the memory data input IN, a
// general register, an input port and the M register. Destinations are the
// ALU operand latches X and Y (Y also in a shifted form used by multiply),
// the memory data output D, the memory address A, a general register, an
// output port, the flags and M.
// The memory interface issues a 12-bit address (A) every cycle; the word read
// there is on mem_rdata one cycle later and is the IN source. mem_we writes D
// at A in the current cycle. The instruction register I is loaded from IN by
// the IN->I line and is transparent in that cycle, so register J is already
// selected in the DECODE cycle ("register prefetch").
// Ports: four input and four output serial links, each as a level input and a
// clamp output (1 = pull the wire low); the wires' pull-ups are outside.
// Structure and control lines follow the document's version B; the clocking
// is this design's: one rising clock edge per microcycle instead of two
// non-overlapping phases.
module mosaic_processor
  import mosaic_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             int_pin,
  output logic [AW-1:0]    mem_addr,
  output logic             mem_we,
  output logic [W-1:0]     mem_wdata,
  input  logic [W-1:0]     mem_rdata,
  input  logic [NPORT-1:0] in_link,
  output logic [NPORT-1:0] in_clamp,
  input  logic [NPORT-1:0] out_link,
  output logic [NPORT-1:0] out_clamp
);
  ctl_t          ctl;
  logic          int_ff;
  logic [W-1:0]  bus;
  logic [W-1:0]  i_reg, i_eff;
  logic [W-1:0]  x, y, d;
  logic          y_m1;
  logic [W-1:0]  r_rdata, w, alu_out, pt_data, m;
  logic          cout, ovf, shift_out;
  logic          fc, fv, fn, fz, fcond, portc, mout, srout;
  logic [AW-1:0] a, pc, ra;

  // ---- instruction register -------------------------------------------------
  assign i_eff = ctl.in_i ? mem_rdata : i_reg;
  always_ff @(posedge clk) i_reg <= i_eff;

  // ---- controller -------------------------------------------------------------
  mosaic_controller u_ctl (
    .clk, .rst, .int_pin,
    .i      (i_eff),
    .fcond, .portc, .mout, .srout,
    .ctl, .int_ff
  );

  // ---- bus ----------------------------------------------------------------------
  always_comb begin
    bus = '1;
    if (ctl.src_w)  bus &= w;
    if (ctl.src_pc) bus &= {fc, fv, fn, fz, pc};
    if (ctl.src_in) bus &= mem_rdata;
    if (ctl.src_r)  bus &= r_rdata;
    if (ctl.src_pt) bus &= pt_data;
    if (ctl.src_m)  bus &= m;
  end

  // ---- datapath units -----------------------------------------------------------
  mosaic_regfile #(.NREG(NREG), .WIDTH(W)) u_regs (
    .clk,
    .use_j (ctl.usej),
    .j     (fld_j(i_eff)),
    .k     (fld_k(i_eff)),
    .we    (ctl.to_r),
    .wdata (bus),
    .rdata (r_rdata)
  );

  mosaic_alu #(.WIDTH(W)) u_alu (
    .x, .y,
    .g (ctl.g), .p (ctl.p), .cforce (ctl.cforce), .cval1 (ctl.cval1),
    .cflag (fc),
    .sh_asr (ctl.sh_asr), .sh_lsr (ctl.sh_lsr), .sh_ror (ctl.sh_ror), .sh_rnib (ctl.sh_rnib),
    .w, .alu (alu_out), .cout, .ovf, .shift_out
  );

  mosaic_flags #(.WIDTH(W)) u_flags (
    .clk, .rst,
    .set_c   (ctl.setc),
    .set_znv (ctl.setznv),
    .shift1  (ctl.sh_asr | ctl.sh_lsr | ctl.sh_ror),
    .load_f  (ctl.to_f),
    .bus_f   (bus[15:12]),
    .w, .cout, .ovf, .shift_out,
    .c (fc), .v (fv), .n (fn), .z (fz)
  );

  mosaic_flag_cond u_fcond (
    .cond (i_eff[6:4]), .c (fc), .v (fv), .n (fn), .z (fz), .fcond
  );

  mosaic_addr #(.AW(AW)) u_addr (
    .clk, .rst,
    .pc_inc (ctl.pc_inc), .ra_inc (ctl.ra_inc), .add1 (ctl.add1),
    .inc_a (ctl.inc_a), .a_pc (ctl.a_pc), .a_ra (ctl.a_ra),
    .bus_a (ctl.to_a), .bus (bus[AW-1:0]),
    .a, .pc, .ra
  );

  mosaic_mulregs #(.WIDTH(W)) u_mul (
    .clk, .rst,
    .load_m (ctl.to_m), .mshift (ctl.mshift), .y_m1, .bus, .srin (ctl.srin),
    .m, .mout, .srout
  );

  mosaic_ports #(.WIDTH(W), .NPORT(NPORT)) u_ports (
    .clk, .rst,
    .sel     (i_eff[6:4]),
    .load    (ctl.to_pt),
    .advance (ctl.advance),
    .bus, .pt_data, .portc,
    .in_link, .in_clamp, .out_link, .out_clamp
  );

  // ---- operand latches and memory data out --------------------------------------
  always_ff @(posedge clk) begin
    if (ctl.to_x) x <= bus;
    if (ctl.to_y)           y <= bus;
    else if (ctl.to_yshift) y <= {cout, bus[W-1:1]};
    if (ctl.to_yshift) y_m1 <= bus[0];
    if (ctl.to_d) d <= bus;
  end

  assign mem_addr  = a;
  assign mem_we    = ctl.write && !rst;
  assign mem_wdata = d;
endmodule

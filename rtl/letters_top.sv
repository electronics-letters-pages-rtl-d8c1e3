// letters_top: two independent designs side by side.
//
// 1. A multi-operand modulo N adder (modadd_csa): operands stream in on a
//    valid/ready interface, the sum modulo N comes out after a carry-save
//    accumulation with sign estimation and a carry-save final reduction.
//    Ports prefixed ma_, clocked by clk/rst_n.
//
// 2. The digital part of a burst-error acquisition test bed for a digital
//    transmission link: an interference transient player (transient_gen)
//    whose code drives an external D/A convertor at the transmitter's LED
//    drive, and an error-interval logger (error_logger) fed by an external
//    error detector. Both are controlled and read by a workstation through
//    the tg_ and el_ ports, clocked by tb_clk/tb_rst_n. The pattern
//    generator, D/A convertor, optical link, receiver, error detector and
//    the workstation itself are outside this design; their signals are the
//    ports here: tg_tick (transmit bit clock), tg_dac_code (to the D/A),
//    el_tick (receive bit clock) and el_err (error flag per received bit).
//
// The two designs share nothing. All parameters are left at their defaults:
// n = 16 for the adder with two resolvers in the final stage, a 1024-sample
// 8-bit waveform table, 16-bit interval counter and 1024-entry interval
// buffer. Timing of each port group is described in the sub-module headers.
module letters_top (
  // modulo N adder
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] ma_modulus,
  input  logic        ma_x_valid,
  output logic        ma_x_ready,
  input  logic [15:0] ma_x,
  input  logic        ma_x_last,
  output logic        ma_res_valid,
  output logic [15:0] ma_res,
  // burst-error test bed
  input  logic        tb_clk,
  input  logic        tb_rst_n,
  input  logic        tg_tick,
  input  logic        tg_tbl_we,
  input  logic [9:0]  tg_tbl_addr,
  input  logic [7:0]  tg_tbl_wdata,
  input  logic [9:0]  tg_last_addr,
  input  logic        tg_trigger,
  output logic        tg_busy,
  output logic [7:0]  tg_dac_code,
  input  logic        el_tick,
  input  logic        el_err,
  input  logic        el_enable,
  input  logic        el_clear,
  input  logic        el_rd_en,
  output logic        el_rd_valid,
  output logic [15:0] el_rd_data,
  output logic [10:0] el_level,
  output logic        el_overflow
);
  modadd_csa u_modadd (
    .clk, .rst_n,
    .modulus(ma_modulus), .x_valid(ma_x_valid), .x_ready(ma_x_ready),
    .x(ma_x), .x_last(ma_x_last), .res_valid(ma_res_valid), .res(ma_res)
  );

  transient_gen u_transient (
    .clk(tb_clk), .rst_n(tb_rst_n), .tick(tg_tick),
    .tbl_we(tg_tbl_we), .tbl_addr(tg_tbl_addr), .tbl_wdata(tg_tbl_wdata),
    .last_addr(tg_last_addr), .trigger(tg_trigger),
    .busy(tg_busy), .dac_code(tg_dac_code)
  );

  error_logger u_logger (
    .clk(tb_clk), .rst_n(tb_rst_n), .tick(el_tick), .err(el_err),
    .enable(el_enable), .clear(el_clear), .rd_en(el_rd_en),
    .rd_valid(el_rd_valid), .rd_data(el_rd_data), .level(el_level),
    .overflow(el_overflow)
  );
endmodule

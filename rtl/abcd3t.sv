// abcd3t: digital part of the ABCD3T 128-channel binary readout chip.
//
// The chip reads 128 silicon strips with a binary architecture: each clock
// the discriminator outputs ('hits') are latched, optionally edge-detected
// and masked (input_register), and delayed by the L1 trigger latency of 132
// clocks (pipeline). An L1 trigger copies the three samples around the
// triggered crossing (or the accumulator) into the 8-event readout buffer.
// The data compression logic zero-suppresses each event and the readout
// logic sends the hit channels as packets on a token-passing serial chain.
// A chip configured as master also tags events with L1 and beam crossing
// counts, sends the module header on the datalink output, starts the token
// and collects the chain's data until the end chip's trailer
// (readout_controller). A serial command line carries triggers and control
// commands (command_decoder) that load the configuration, mask, DAC, trim and
// strobe delay registers and fire calibration pulses.
//
// Ports: two differential clock/command pairs chosen by 'select'; resetB, the
// asynchronous power-up reset (active low); ID<4:0> (ID<5> is 1 inside);
// masterB; normal (tokenin, datain) and bypass (...BP) token/data inputs and
// outputs as true/complement pairs; datalink to the optical link driver.
// The analogue front end is outside this RTL: 'hits' are its discriminator
// outputs and threshold, calamp, ish, ipre, trim_range, trim, cal_strobe,
// cald and cal_group are the digital controls it receives. The calibration
// strobe passes through the strobe delay line, an analogue part that is
// represented by a behavioural model (strobe_delay_line); synthesis keeps
// only its flags, so a netlist of this top needs the real delay line there.
//
// Own choices: the readout buffer write is level3 delayed by one clock (the
// pipeline captures during level3); a soft reset clears the data path but
// not the configuration, mask, DAC and trim registers nor the Send_ID mode;
// with clock feed-through the datalink carries the clock divided by two.
module abcd3t
  import abcd_pkg::*;
(
  input  logic clk0, clk0B, clk1, clk1B,
  input  logic com0, com0B, com1, com1B,
  input  logic select,
  input  logic resetB,
  input  logic [4:0] id,
  input  logic masterB,
  input  logic tokenin, tokeninB, tokeninBP, tokeninBPB,
  input  logic datain, datainB, datainBP, datainBPB,
  output logic tokenout, tokenoutB, tokenoutBP, tokenoutBPB,
  output logic dataout, dataoutB, dataoutBP, dataoutBPB,
  output logic datalink, datalinkB,
  input  logic [NCH-1:0]      hits,
  output logic [7:0]          threshold,
  output logic [7:0]          calamp,
  output logic [4:0]          ish,
  output logic [4:0]          ipre,
  output logic [1:0]          trim_range,
  output logic [NCH-1:0][3:0] trim,
  output logic                cal_strobe,
  output logic [1:0]          cald,
  output logic [3:0]          cal_group
);
  logic clk, command;
  logic [5:0] id6;
  assign id6 = {1'b1, id};

  clk_cmd_select u_clksel (
    .clk0, .clk0B, .clk1, .clk1B, .com0, .com0B, .com1, .com1B, .select,
    .clk, .command
  );

  // Command decoding
  logic sendidmode, softresetB, calstrobe, loadmaskreg, level1, level3;
  logic loadconfigreg, strobeconfigreg, loaddelayreg, loadthresholdreg;
  logic loadtrimdacreg, loadbiasreg, bcresetB, pulseinputreg, sdata;
  logic [15:0] cmd_data;

  command_decoder u_dec (
    .clk, .clrB(resetB), .id(id6), .command,
    .sendidmode, .softresetB, .calstrobe, .loadmaskreg, .level1, .level3,
    .loadconfigreg, .strobeconfigreg, .loaddelayreg, .loadthresholdreg,
    .loadtrimdacreg, .loadbiasreg, .bcresetB, .pulseinputreg, .sdata,
    .data(cmd_data)
  );

  logic rstB;  // power-up or soft reset
  assign rstB = resetB & softresetB;

  // Configuration and DAC registers
  logic [15:0] cfg_bits;
  config_t     cfg;
  assign cfg = config_t'(cfg_bits);

  configuration_register u_cfg (
    .clk, .clrB(resetB), .in(sdata), .shift(loadconfigreg),
    .load(strobeconfigreg), .dataout(cfg_bits)
  );

  threshold_cal_register u_thr (
    .clk, .clrB(resetB), .load(loadthresholdreg), .data(cmd_data),
    .threshold, .calamp
  );

  bias_register u_bias (
    .clk, .clrB(resetB), .load(loadbiasreg), .data(cmd_data), .ish, .ipre
  );

  logic [6:0] trim_addr;
  logic [3:0] trim_val;
  trimdac_register u_trim (
    .clk, .clrB(resetB), .load(loadtrimdacreg), .data(cmd_data),
    .addr(trim_addr), .trim_val, .trim
  );
  assign trim_range = cfg.trim_range;

  // Calibration
  logic [5:0] delay_code;
  logic       cal_strobe_clk;
  strobe_delay_register u_sdreg (
    .clk, .clrB(resetB), .load(loaddelayreg), .data(cmd_data[7:0]), .code(delay_code)
  );
  calibration_logic u_cal (
    .clk, .clrB(resetB), .calcmd(calstrobe), .cal_mode(cfg.cal_mode),
    .strobe(cal_strobe_clk), .cald, .group(cal_group)
  );
  strobe_delay_line u_sdline (
    .strobein(cal_strobe_clk), .code(delay_code), .strobeout(cal_strobe)
  );

  // Data path
  logic [NCH-1:0] ir_out, pl_out, rb_out;
  logic           rb_write, rb_avail, rb_ovf, rb_err;

  input_register u_ir (
    .clk, .clrB(resetB), .i(hits), .load(loadmaskreg), .sin(sdata),
    .mode(cfg.mask_mode), .edgemode(cfg.edge_detect), .pulse(pulseinputreg),
    .o(ir_out)
  );

  pipeline u_pl (
    .clk, .clrB(rstB), .i(ir_out), .acen(cfg.accumulate), .level1(level3),
    .o(pl_out)
  );

  always_ff @(posedge clk or negedge rstB)
    if (!rstB) rb_write <= 1'b0;
    else       rb_write <= level3;

  logic buffrd;
  readout_buffer u_rb (
    .clk, .clrB(rstB), .i(pl_out), .write(rb_write), .read(buffrd),
    .o(rb_out), .data_avail(rb_avail), .overflow(rb_ovf), .error(rb_err)
  );

  logic       dc_ovf, dc_adj, dc_dv, dc_end, rol_next;
  logic [6:0] dc_ch;
  logic [2:0] dc_hit;
  data_compression u_dc (
    .clk, .clrB(rstB), .i(rb_out), .overflow(rb_ovf), .error(rb_err),
    .sendid(sendidmode), .dataavail(rb_avail), .mode(cfg.ro_mode),
    .next(rol_next), .overflowout(dc_ovf), .adj(dc_adj), .ch(dc_ch),
    .hit(dc_hit), .datavalid(dc_dv), .end_o(dc_end), .buffrd
  );

  // Token and data chain
  logic chip_tokenin, chip_datain, rol_dataout, rol_tokenout, ctl_tokenout;
  logic chip_dataout, ledout, master;
  assign master = ~(cfg.master_n | masterB);

  token_data_in u_tin (
    .in0(tokenin), .in0B(tokeninB), .in1(tokeninBP), .in1B(tokeninBPB),
    .bypassin(cfg.in_bypass), .out(chip_tokenin)
  );
  token_data_in u_din (
    .in0(datain), .in0B(datainB), .in1(datainBP), .in1B(datainBPB),
    .bypassin(cfg.in_bypass), .out(chip_datain)
  );

  readout_logic u_rol (
    .clk, .clrB(rstB), .datain(chip_datain), .tokenin(ctl_tokenout),
    .ch(dc_ch), .hit(dc_hit), .datavalid(dc_dv), .adj(dc_adj), .end_i(dc_end),
    .id(id6[3:0]), .overflow(dc_ovf), .error(rb_err), .sendid(sendidmode),
    .config_i(cfg_bits), .dataout(rol_dataout), .tokenout(rol_tokenout),
    .next(rol_next)
  );

  readout_controller u_ctl (
    .clk, .clrB(rstB), .datain(rol_dataout), .tokenin(chip_tokenin),
    .level1, .bcresetB, .header_enable(master), .trailer_enable(cfg.end_chip),
    .token_back(rol_tokenout), .dataout(chip_dataout), .tokenout(ctl_tokenout),
    .ledout
  );

  token_data_out u_tout (
    .in(rol_tokenout), .bypassout({2{cfg.out_bypass}}),
    .out0(tokenout), .out0B(tokenoutB), .out1(tokenoutBP), .out1B(tokenoutBPB)
  );
  token_data_out u_dout (
    .in(chip_dataout), .bypassout({2{cfg.out_bypass}}),
    .out0(dataout), .out0B(dataoutB), .out1(dataoutBP), .out1B(dataoutBPB)
  );

  // Datalink with clock feed-through (clock / 2) in a master
  logic clkdiv2;
  always_ff @(posedge clk or negedge resetB)
    if (!resetB) clkdiv2 <= 1'b0;
    else         clkdiv2 <= ~clkdiv2;

  assign datalink  = (master && !cfg.feed_through_n) ? clkdiv2 : ledout;
  assign datalinkB = ~datalink;
endmodule

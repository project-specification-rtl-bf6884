// abcd_pkg: types and constants shared by the ABCD3T digital blocks.
//
// The configuration register layout (config_t) follows the bit table of the
// configuration register: bits 1:0 readout (compression) mode, 3:2 calibration
// mode, 5:4 trim DAC range, 6 edge detect, 7 mask (test) mode, 8 accumulate,
// 9 input bypass, 10 output bypass, 11 master (active low, ORed with masterB),
// 12 end of chain, 13 clock feed-through (active low), 15:14 unused.
// Command codes, register select codes and packet codes are the ones of the
// chip's control and readout protocols.
package abcd_pkg;

  localparam int NCH = 128;

  typedef enum logic [1:0] {
    RO_HIT   = 2'b00,  // 1XX or X1X or XX1
    RO_LEVEL = 2'b01,  // X1X
    RO_EDGE  = 2'b10,  // 01X
    RO_TEST  = 2'b11   // XXX
  } ro_mode_e;

  typedef struct packed {
    logic [1:0] unused;
    logic       feed_through_n;
    logic       end_chip;
    logic       master_n;
    logic       out_bypass;
    logic       in_bypass;
    logic       accumulate;
    logic       mask_mode;
    logic       edge_detect;
    logic [1:0] trim_range;
    logic [1:0] cal_mode;
    ro_mode_e   ro_mode;
  } config_t;

  // Field 1 of a command
  localparam logic [2:0] CMD_L1      = 3'b110;
  localparam logic [2:0] CMD_CONTROL = 3'b101;
  // Field 2 of a control command
  localparam logic [3:0] F2_SOFT_RESET = 4'b0100;
  localparam logic [3:0] F2_BC_RESET   = 4'b0010;
  localparam logic [3:0] F2_SLOW       = 4'b0111;
  // Field 5 of a slow command
  localparam logic [5:0] F5_CONFIG    = 6'b000000;
  localparam logic [5:0] F5_MASK      = 6'b001000;
  localparam logic [5:0] F5_DELAY     = 6'b010000;
  localparam logic [5:0] F5_THRESHOLD = 6'b011000;
  localparam logic [5:0] F5_PULSE     = 6'b100000;
  localparam logic [5:0] F5_DATA_TAKE = 6'b101000;
  localparam logic [5:0] F5_CAL       = 6'b110000;
  localparam logic [5:0] F5_BIAS      = 6'b111000;
  localparam logic [5:0] F5_TRIM      = 6'b000100;

  // Error codes (eee) and the configuration packet code
  localparam logic [2:0] ERR_NO_DATA  = 3'b001;
  localparam logic [2:0] ERR_OVERFLOW = 3'b010;
  localparam logic [2:0] ERR_BUFFER   = 3'b100;
  localparam logic [2:0] CFG_CODE     = 3'b111;

  // Module header and trailer
  localparam logic [4:0]  PREAMBLE = 5'b11101;
  localparam logic [15:0] TRAILER  = 16'h8000;

  // Compression criterion on a 3-bit pattern, oldest sample in bit 2.
  function automatic logic hit_match(ro_mode_e m, logic [2:0] d);
    unique case (m)
      RO_HIT:   return |d;
      RO_LEVEL: return d[1];
      RO_EDGE:  return d[2:1] == 2'b01;
      default:  return 1'b1;
    endcase
  endfunction

endpackage

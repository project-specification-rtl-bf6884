// command_decoder: serial command decoder.
//
// All triggers and control data arrive on one serial command line, sampled
// at each rising clock edge. An idle line is 0; a command starts with its
// first 1. Field 1 (3 bits) gives the class:
//   110                         L1 trigger: level1 for one clock, level3 for three
//   101 0100                    fast command: soft reset (softresetB low one clock)
//   101 0010                    fast command: beam crossing reset (bcresetB low)
//   101 0111 <n:8> <addr:6> <reg:6> <data:n-12>   slow command
// In a slow command, n counts the bits after field 3 (12, 28 or 140). Every
// chip decodes every slow command so that it stays in step, but acts only if
// addr equals its ID or is a broadcast address (1x1111). Register codes
// (field 5): 000000 configuration, 001000 mask (128 bits), 010000 strobe
// delay, 011000 threshold/calibration, 100000 pulse input register, 101000
// enable data taking, 110000 calibration pulse, 111000 bias DAC, 000100 trim
// DAC. Commands whose field 5 starts with 0 put the chip in Send_ID mode;
// 101000 returns it to data taking. Send_ID is the power-up state.
//
// Data handling (this design's choice): while the data bits of a mask or
// configuration command pass, loadmaskreg / loadconfigreg is high with the
// bit on sdata, one clock after it was sampled, so the target shift register
// takes it at the following edge. The last 16 data bits are also kept in
// 'data'. One clock after the last shift enable the command's load pulse
// (strobeconfigreg, loaddelayreg, loadthresholdreg, loadbiasreg,
// loadtrimdacreg, pulseinputreg, calstrobe) is issued for one clock. All
// outputs are registered. clrB: asynchronous power-up reset.
module command_decoder
  import abcd_pkg::*;
(
  input  logic        clk,
  input  logic        clrB,
  input  logic [5:0]  id,
  input  logic        command,
  output logic        sendidmode,
  output logic        softresetB,
  output logic        calstrobe,
  output logic        loadmaskreg,
  output logic        level1,
  output logic        level3,
  output logic        loadconfigreg,
  output logic        strobeconfigreg,
  output logic        loaddelayreg,
  output logic        loadthresholdreg,
  output logic        loadtrimdacreg,
  output logic        loadbiasreg,
  output logic        bcresetB,
  output logic        pulseinputreg,
  output logic        sdata,
  output logic [15:0] data
);
  typedef enum logic [2:0] {S_IDLE, S_F1, S_F2, S_F3, S_F4, S_F5, S_F6} state_e;
  state_e     state;
  logic [7:0] sh;        // field shift register
  logic [7:0] cnt;       // bits taken in the current field
  logic [7:0] rem;       // data bits still to come in field 6
  logic [5:0] addr, f5;
  logic       dispatch;
  logic [1:0] l3cnt;
  logic       match;

  logic [7:0] sh_n;
  assign sh_n  = {sh[6:0], command};
  assign match = (addr == id) || (addr[5] && addr[3:0] == 4'hF);

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      state <= S_IDLE; sh <= '0; cnt <= '0; rem <= '0; addr <= '0; f5 <= '0;
      dispatch <= 1'b0; l3cnt <= '0; data <= '0; sdata <= 1'b0;
      sendidmode <= 1'b1; softresetB <= 1'b1; bcresetB <= 1'b1;
      calstrobe <= 1'b0; loadmaskreg <= 1'b0; level1 <= 1'b0; level3 <= 1'b0;
      loadconfigreg <= 1'b0; strobeconfigreg <= 1'b0; loaddelayreg <= 1'b0;
      loadthresholdreg <= 1'b0; loadtrimdacreg <= 1'b0; loadbiasreg <= 1'b0;
      pulseinputreg <= 1'b0;
    end else begin
      // one-clock outputs
      softresetB <= 1'b1; bcresetB <= 1'b1; level1 <= 1'b0;
      calstrobe <= 1'b0; loadmaskreg <= 1'b0; loadconfigreg <= 1'b0;
      strobeconfigreg <= 1'b0; loaddelayreg <= 1'b0; loadthresholdreg <= 1'b0;
      loadtrimdacreg <= 1'b0; loadbiasreg <= 1'b0; pulseinputreg <= 1'b0;
      dispatch <= 1'b0;
      sh  <= sh_n;
      cnt <= cnt + 1'b1;

      // level3: level1 stretched to three clocks
      if (l3cnt != '0) l3cnt <= l3cnt - 1'b1;
      level3 <= l3cnt != '0;

      // actions of a completed slow command
      if (dispatch && match) begin
        unique case (f5)
          F5_CONFIG:    strobeconfigreg  <= 1'b1;
          F5_DELAY:     loaddelayreg     <= 1'b1;
          F5_THRESHOLD: loadthresholdreg <= 1'b1;
          F5_PULSE:     pulseinputreg    <= 1'b1;
          F5_CAL:       calstrobe        <= 1'b1;
          F5_BIAS:      loadbiasreg      <= 1'b1;
          F5_TRIM:      loadtrimdacreg   <= 1'b1;
          default: ;
        endcase
        if (f5 == F5_DATA_TAKE) sendidmode <= 1'b0;
        else if (!f5[5])        sendidmode <= 1'b1;
      end

      unique case (state)
        S_IDLE:
          if (command) begin
            state <= S_F1;
            cnt   <= 8'd1;
          end
        S_F1:
          if (cnt == 8'd2) begin
            cnt <= '0;
            if (sh_n[2:0] == CMD_L1) begin
              state  <= S_IDLE;
              level1 <= 1'b1;
              level3 <= 1'b1;
              l3cnt  <= 2'd2;
            end else if (sh_n[2:0] == CMD_CONTROL) state <= S_F2;
            else                                  state <= S_IDLE;
          end
        S_F2:
          if (cnt == 8'd3) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (sh_n[3:0] == F2_SOFT_RESET)    softresetB <= 1'b0;
            else if (sh_n[3:0] == F2_BC_RESET) bcresetB   <= 1'b0;
            else if (sh_n[3:0] == F2_SLOW)     state      <= S_F3;
          end
        S_F3:
          if (cnt == 8'd7) begin
            cnt   <= '0;
            rem   <= sh_n - 8'd12;
            state <= S_F4;
          end
        S_F4:
          if (cnt == 8'd5) begin
            cnt   <= '0;
            addr  <= sh_n[5:0];
            state <= S_F5;
          end
        S_F5:
          if (cnt == 8'd5) begin
            cnt <= '0;
            f5  <= sh_n[5:0];
            if (rem == '0 || rem > 8'd128) begin
              dispatch <= 1'b1;
              state    <= S_IDLE;
            end else state <= S_F6;
          end
        S_F6: begin
          data  <= {data[14:0], command};
          sdata <= command;
          if (match && f5 == F5_MASK)   loadmaskreg   <= 1'b1;
          if (match && f5 == F5_CONFIG) loadconfigreg <= 1'b1;
          rem <= rem - 1'b1;
          if (rem == 8'd1) begin
            dispatch <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
endmodule

// Serial programming of the two LTC1660 octal 10-bit DACs.
// A programming request whose 7-bit address is 1000xxx (DAC 0) or 1001xxx
// (DAC 1) is turned into a 16-bit serial word {A3..A0, D9..D0, 0, 0}: the
// DAC line address is the three address LSBs, with 0 remapped to 8 (line
// H), and D9..D0 are PROGData[9:0]. The word is shifted out MSB first on
// DAC_Din while the selected DAC's CS/LD is low; DAC_SCK rises in the
// middle of each bit and is idle low between transfers (gated clock).
// CS/LD rises after bit 0, which loads the DAC, and PROG_ACK pulses.
// Requests to other addresses are ignored (the processing core answers
// them). The module advances one step every DIV clock cycles, so SCK runs
// at CLK / (2*DIV): 50 MHz with DIV = 16 gives 1.5625 MHz as in the
// document. The control-word format and the address codes (1 = line A ...
// 8 = line H) are those of the LTC1660 data sheet, not of the document.
module dac_control #(
  parameter int DIV = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] prog_data,
  input  logic [6:0]  prog_add,
  input  logic        prog_flag,
  output logic        prog_ack,
  output logic        dac_din,
  output logic        dac_csld0,
  output logic        dac_csld1,
  output logic        dac_sck
);
  logic [$clog2(DIV)-1:0] div_cnt;
  logic        tick, flag_q, busy, which, half;
  logic [15:0] shreg;
  logic [4:0]  bits_left;
  logic [3:0]  code;

  assign tick = (div_cnt == '0);
  assign code = (prog_add[2:0] == 3'd0) ? 4'd8 : {1'b0, prog_add[2:0]};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      div_cnt <= '0; flag_q <= 1'b0; busy <= 1'b0; which <= 1'b0; half <= 1'b0;
      shreg <= '0; bits_left <= '0; prog_ack <= 1'b0;
      dac_din <= 1'b0; dac_csld0 <= 1'b1; dac_csld1 <= 1'b1; dac_sck <= 1'b0;
    end else begin
      flag_q   <= prog_flag;
      prog_ack <= 1'b0;
      div_cnt  <= (div_cnt == $clog2(DIV)'(DIV - 1)) ? '0 : div_cnt + 1'b1;
      if (!busy) begin
        if (prog_flag && !flag_q && prog_add[6:4] == 3'b100) begin
          busy <= 1'b1; which <= prog_add[3]; half <= 1'b0;
          shreg <= {code, prog_data[9:0], 2'b00}; bits_left <= 5'd16;
        end
      end else if (tick) begin
        if (bits_left != '0) begin
          if (!half) begin             // present the next bit, SCK low, CS/LD low
            dac_sck <= 1'b0;
            dac_din <= shreg[15];
            shreg   <= {shreg[14:0], 1'b0};
            if (which) dac_csld1 <= 1'b0; else dac_csld0 <= 1'b0;
            half <= 1'b1;
          end else begin               // rising SCK edge samples the bit
            dac_sck   <= 1'b1;
            bits_left <= bits_left - 1'b1;
            half      <= 1'b0;
          end
        end else begin                 // end of word: SCK low, CS/LD up loads the DAC
          dac_sck   <= 1'b0;
          dac_csld0 <= 1'b1;
          dac_csld1 <= 1'b1;
          busy      <= 1'b0;
          prog_ack  <= 1'b1;
        end
      end
    end
  end
endmodule

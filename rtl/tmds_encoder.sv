// tmds_encoder: one TMDS channel of the HDMI transmitter.
//
// Each pixel clock it turns its input into one registered 10-bit symbol,
// chosen by mode:
//   TM_VIDEO   8b/10b video coding. Stage 1 (transition minimisation) keeps
//              d[0] and chains the other bits with XOR, or with XNOR when the
//              byte has more than four ones (or exactly four and d[0] = 0);
//              bit 8 records XOR (1) or XNOR (0). Stage 2 (DC balance) keeps
//              a signed running disparity and inverts bits 7:0 when that
//              moves the disparity toward zero; bit 9 records the inversion.
//   TM_CTRL    one of the four control words for c[1:0].
//   TM_TERC4   the TERC4 word for the 4-bit data island nibble t4.
//   TM_VGUARD  video leading guard band (channels 0 and 2: 1011001100,
//              channel 1: 0100110011).
//   TM_DGUARD  data island guard band 0100110011 (channels 1 and 2; channel
//              0 sends a TERC4 word instead, chosen by hdmi_tx).
// The running disparity is cleared in every non-video period. Bit 0 of the
// symbol is transmitted first.
//
// From the document: the two-stage TMDS algorithm with the XOR/XNOR choice,
// the ninth flag bit, the running disparity and the tenth inversion bit;
// control coding, TERC4 and guard bands. Own (from the DVI/HDMI
// specifications): the tie-break for exactly four ones and the code tables.
module tmds_encoder
  import zx_pkg::*;
#(
  parameter int unsigned CHANNEL = 0
) (
  input  logic       clk_pix,
  input  logic       rst,
  input  tmds_mode_e mode,
  input  logic [7:0] d,
  input  logic [1:0] c,
  input  logic [3:0] t4,
  output logic [9:0] q
);
  logic [3:0] n1d, n1q;
  logic [8:0] qm;
  logic       use_xnor;
  logic signed [5:0] cnt, cnt_next;
  logic [9:0] vq;

  // Stage 1: chain the bits with XOR or XNOR; bit 8 = 1 for XOR.
  function automatic logic [8:0] minimise(input logic [7:0] din, input logic xn);
    logic [8:0] r;
    r[0] = din[0];
    for (int i = 1; i < 8; i++)
      r[i] = xn ? ~(r[i-1] ^ din[i]) : (r[i-1] ^ din[i]);
    r[8] = !xn;
    return r;
  endfunction

  always_comb begin
    n1d = 4'($countones(d));
    use_xnor = (n1d > 4'd4) || ((n1d == 4'd4) && !d[0]);
    qm = minimise(d, use_xnor);
    n1q = 4'($countones(qm[7:0]));

    // disparity of the 8 data bits as sent uninverted: ones minus zeros
    if (cnt == 0 || n1q == 4'd4) begin
      vq = {~qm[8], qm[8], qm[8] ? qm[7:0] : ~qm[7:0]};
      if (qm[8]) cnt_next = cnt + 6'(signed'({2'b00, n1q})) - 6'(signed'({2'b00, 4'd8 - n1q}));
      else       cnt_next = cnt + 6'(signed'({2'b00, 4'd8 - n1q})) - 6'(signed'({2'b00, n1q}));
    end else if ((cnt > 0 && n1q > 4'd4) || (cnt < 0 && n1q < 4'd4)) begin
      vq = {1'b1, qm[8], ~qm[7:0]};
      cnt_next = cnt + 6'(qm[8] ? 2 : 0) + 6'(signed'({2'b00, 4'd8 - n1q})) - 6'(signed'({2'b00, n1q}));
    end else begin
      vq = {1'b0, qm[8], qm[7:0]};
      cnt_next = cnt - 6'(qm[8] ? 0 : 2) + 6'(signed'({2'b00, n1q})) - 6'(signed'({2'b00, 4'd8 - n1q}));
    end
  end

  function automatic logic [9:0] ctrl_code(input logic [1:0] cc);
    unique case (cc)
      2'b00: return 10'b1101010100;
      2'b01: return 10'b0010101011;
      2'b10: return 10'b0101010100;
      default: return 10'b1010101011;
    endcase
  endfunction

  function automatic logic [9:0] terc4_code(input logic [3:0] n);
    unique case (n)
      4'h0: return 10'b1010011100;
      4'h1: return 10'b1001100011;
      4'h2: return 10'b1011100100;
      4'h3: return 10'b1011100010;
      4'h4: return 10'b0101110001;
      4'h5: return 10'b0100011110;
      4'h6: return 10'b0110001110;
      4'h7: return 10'b0100111100;
      4'h8: return 10'b1011001100;
      4'h9: return 10'b0100111001;
      4'hA: return 10'b0110011100;
      4'hB: return 10'b1011000110;
      4'hC: return 10'b1010001110;
      4'hD: return 10'b1001110001;
      4'hE: return 10'b0101100011;
      default: return 10'b1011000011;
    endcase
  endfunction

  always_ff @(posedge clk_pix) begin
    if (rst) begin
      cnt <= '0;
      q   <= ctrl_code(2'b00);
    end else begin
      unique case (mode)
        TM_VIDEO: begin
          q   <= vq;
          cnt <= cnt_next;
        end
        TM_TERC4: begin
          q   <= terc4_code(t4);
          cnt <= '0;
        end
        TM_VGUARD: begin
          q   <= (CHANNEL == 1) ? 10'b0100110011 : 10'b1011001100;
          cnt <= '0;
        end
        TM_DGUARD: begin
          q   <= 10'b0100110011;
          cnt <= '0;
        end
        default: begin
          q   <= ctrl_code(c);
          cnt <= '0;
        end
      endcase
    end
  end
endmodule

// ym2149: AY-3-8912 / YM2149 programmable sound generator.
//
// Bus side (Z80 clock domain): the chip sits at the ZX Spectrum 128 ports.
// An I/O write with A15 = 1, A1 = 0 and A14 = 1 (0xFFFD) latches the register
// number; the same with A14 = 0 (0xBFFD) writes the selected register. An
// I/O read with A15 = 1, A1 = 0 returns the selected register (rd_oe high).
// The bus is sampled on every rising Z80 clock edge while IORQ and WR are low
// (interrupt acknowledge, IORQ with M1, is ignored); repeating a write within
// one bus cycle is harmless except that it restarts the envelope once more
// inside the same cycle.
//
// Sound side: the master clock is the Z80 clock divided by CLK_DIV (1.75 MHz
// for 3.5 MHz). Every 8 master clocks each tone counter advances and its
// square wave toggles after TP counts (12-bit period, 0 treated as 1), so the
// tone is f_master / (16 * TP). Every 16 master clocks the noise counter
// advances; after NP counts (5-bit) a 17-bit LFSR (feedback bit0 ^ bit3)
// steps. The mixer (R7, active-low enables) ANDs tone and noise per channel.
// The envelope has 32 steps, one every 8 * EP master clocks (16-bit period),
// and follows shape R13 (CONTINUE, ATTACK, ALTERNATE, HOLD); writing R13
// restarts it. A channel's 5-bit level is the envelope or its 4-bit amplitude
// (2a+1), mapped through a logarithmic DAC table (1.5 dB per step) to 8 bits.
// Outputs ch_a/b/c are the 8-bit unsigned amplitudes.
//
// From the document: three tone generators with 12-bit periods and
// f/(16*TP), a noise LFSR, the R7 mixer, amplitude and shared envelope
// (RB, RC period and RD shape), the YM's 32-level DAC, the port pair
// 0xFFFD/0xBFFD and the two-cycle register access, 8-bit channel outputs,
// no I/O ports. Own (from the chips' data sheets): the prescalers, the LFSR
// taps and the DAC curve. The document says a read uses 0xBFFD while
// Spectrum 128 software reads 0xFFFD; reads at both answer. R14/R15 (the
// I/O ports) are left out of this design and read as 0xFF.
module ym2149 #(
  parameter int unsigned CLK_DIV = 2
) (
  input  logic        clk,        // Z80 clock
  input  logic        rst,
  input  logic [15:0] zx_a,
  input  logic [7:0]  zx_d,
  input  logic        zx_iorq_n,
  input  logic        zx_rd_n,
  input  logic        zx_wr_n,
  input  logic        zx_m1_n,
  output logic [7:0]  rd_data,
  output logic        rd_oe,
  output logic [7:0]  ch_a,
  output logic [7:0]  ch_b,
  output logic [7:0]  ch_c
);
  logic [7:0] regs [14];
  logic [3:0] sel;

  logic io, psg;
  assign io  = !zx_iorq_n && zx_m1_n;
  assign psg = io && zx_a[15] && !zx_a[1];
  assign rd_oe   = psg && !zx_rd_n;
  assign rd_data = (sel < 4'd14) ? regs[sel] : 8'hFF;

  logic env_restart;
  always_ff @(posedge clk) begin
    env_restart <= 1'b0;
    if (rst) begin
      sel <= '0;
      for (int i = 0; i < 14; i++) regs[i] <= '0;
      regs[7] <= 8'hFF;
    end else if (psg && !zx_wr_n) begin
      if (zx_a[14]) sel <= zx_d[3:0];
      else if (sel < 4'd14) begin
        regs[sel] <= zx_d;
        if (sel == 4'd13) env_restart <= 1'b1;
      end
    end
  end

  // -------------------------------------------------------------- prescaler
  logic [$clog2(CLK_DIV+1)-1:0] div;
  logic [3:0] pre;
  logic       m_en, tone_en, noise_en;
  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0;
      pre <= '0;
    end else begin
      div <= (div == ($bits(div))'(CLK_DIV - 1)) ? '0 : div + 1'b1;
      if (m_en) pre <= pre + 4'd1;
    end
  end
  assign m_en     = (div == ($bits(div))'(CLK_DIV - 1));
  assign tone_en  = m_en && (pre[2:0] == 3'd7);
  assign noise_en = m_en && (pre == 4'd15);

  // -------------------------------------------------------------- tones
  logic [11:0] tcnt [3];
  logic [2:0]  tone;
  logic [11:0] tp [3];
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      tp[i] = {regs[2*i+1][3:0], regs[2*i]};
      if (tp[i] == '0) tp[i] = 12'd1;
    end
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      tone <= '0;
      for (int i = 0; i < 3; i++) tcnt[i] <= '0;
    end else if (tone_en) begin
      for (int i = 0; i < 3; i++) begin
        if (tcnt[i] >= tp[i] - 12'd1) begin
          tcnt[i] <= '0;
          tone[i] <= ~tone[i];
        end else begin
          tcnt[i] <= tcnt[i] + 12'd1;
        end
      end
    end
  end

  // -------------------------------------------------------------- noise
  logic [4:0]  ncnt, np;
  logic [16:0] lfsr;
  assign np = (regs[6][4:0] == '0) ? 5'd1 : regs[6][4:0];
  always_ff @(posedge clk) begin
    if (rst) begin
      ncnt <= '0;
      lfsr <= 17'h1;
    end else if (noise_en) begin
      if (ncnt >= np - 5'd1) begin
        ncnt <= '0;
        lfsr <= {lfsr[0] ^ lfsr[3], lfsr[16:1]};
      end else begin
        ncnt <= ncnt + 5'd1;
      end
    end
  end

  // -------------------------------------------------------------- envelope
  logic [15:0] ecnt, ep;
  logic [4:0]  estep;
  logic        eatt, ehold, ezero;
  logic [4:0]  env;
  assign ep  = ({regs[12], regs[11]} == '0) ? 16'd1 : {regs[12], regs[11]};
  assign env = ezero ? 5'd0 : (estep ^ {5{~eatt}});
  always_ff @(posedge clk) begin
    if (rst || env_restart) begin
      ecnt  <= '0;
      estep <= '0;
      eatt  <= regs[13][2];
      ehold <= 1'b0;
      ezero <= 1'b0;
    end else if (tone_en && !ehold) begin
      if (ecnt >= ep - 16'd1) begin
        ecnt <= '0;
        if (estep != 5'd31) begin
          estep <= estep + 5'd1;
        end else if (!regs[13][3]) begin          // CONTINUE = 0: drop to 0
          ehold <= 1'b1;
          ezero <= 1'b1;
        end else if (regs[13][0]) begin           // HOLD
          ehold <= 1'b1;
          if (regs[13][1]) eatt <= ~eatt;
        end else begin
          estep <= '0;
          if (regs[13][1]) eatt <= ~eatt;         // ALTERNATE
        end
      end else begin
        ecnt <= ecnt + 16'd1;
      end
    end
  end

  // -------------------------------------------------------------- mixer, DAC
  function automatic logic [7:0] dac(input logic [4:0] l);
    // 255 * 10^(-(31-l)*1.5/20), rounded; level 0 is silent
    unique case (l)
      5'd0: return 8'd0;    5'd1: return 8'd1;    5'd2: return 8'd2;    5'd3: return 8'd2;
      5'd4: return 8'd2;    5'd5: return 8'd3;    5'd6: return 8'd3;    5'd7: return 8'd4;
      5'd8: return 8'd5;    5'd9: return 8'd6;    5'd10: return 8'd7;   5'd11: return 8'd8;
      5'd12: return 8'd10;  5'd13: return 8'd11;  5'd14: return 8'd14;  5'd15: return 8'd16;
      5'd16: return 8'd19;  5'd17: return 8'd23;  5'd18: return 8'd27;  5'd19: return 8'd32;
      5'd20: return 8'd38;  5'd21: return 8'd45;  5'd22: return 8'd54;  5'd23: return 8'd64;
      5'd24: return 8'd76;  5'd25: return 8'd90;  5'd26: return 8'd108; 5'd27: return 8'd128;
      5'd28: return 8'd152; 5'd29: return 8'd181; 5'd30: return 8'd215; default: return 8'd255;
    endcase
  endfunction

  logic [2:0] on;
  logic [4:0] lvl [3];
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      on[i]  = (tone[i] | regs[7][i]) & (lfsr[0] | regs[7][i+3]);
      lvl[i] = regs[8+i][4] ? env : ((regs[8+i][3:0] == '0) ? 5'd0 : {regs[8+i][3:0], 1'b1});
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ch_a <= '0; ch_b <= '0; ch_c <= '0;
    end else begin
      ch_a <= on[0] ? dac(lvl[0]) : 8'd0;
      ch_b <= on[1] ? dac(lvl[1]) : 8'd0;
      ch_c <= on[2] ? dac(lvl[2]) : 8'd0;
    end
  end
endmodule

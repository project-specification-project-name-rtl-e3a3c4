// Command decoder. Commands arrive serially on "command", one bit per beam
// crossing (bc_en), MSB first; the idle line is 0. Formats:
//   L1 trigger:        110
//   fast commands:     101 0100 (soft reset), 101 0010 (BC reset)
//   slow commands:     101 0111 LLLLLLLL aaaaaaa ffffff [data]
// where L is the number of bits that follow it minus one (so 28 for a 16-bit
// register write, 140 for the 128-bit mask, 12 for data-less commands), a
// the chip address (1111111 addresses every chip) and f field 5: bits 5:1
// the register address, bit 0 set for a read. Every chip parses every
// command, so unaddressed chips stay in step. For an addressed write the
// data bits are shifted into the selected register as they arrive (the
// "sh_*" strobes with "sdata"); at the end cached registers get a load
// strobe and a TrimDac write updates the channel's trim code.
// Chip mode: any register write puts the chip in send-ID mode, the
// "enable data taking" instruction in data-taking mode, any read in
// read-register mode. A read copies the register into the 16-bit mirror
// register (serially for cached and serial registers, 17 clocks after the
// command; in parallel for the status registers) and its address into
// cregister; a cached register's parity is checked against the bits read.
// Unknown fast or slow codes raise fc_unused / sc_unused for one clock.
// Field layouts, codes and mode rules follow the specification. The mask
// register cannot be read back (its read returns 0: it is listed as
// load-only). Hard reset gives send-ID mode.
module abcn_command_decoder
  import abcn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bc_en,
  input  logic              command,
  input  logic [6:0]        id,
  output logic              l1,
  output logic              soft_reset,
  output logic              bcr,
  output chip_mode_e        mode,
  output logic              test_pulse,
  output logic              cal_pulse,
  // register access
  output logic              sdata,
  output logic [NCREG-1:0]  sh_creg,
  output logic [NCREG-1:0]  ld_creg,
  output logic [NCREG-1:0]  rd_creg,
  input  logic [NCREG-1:0]  creg_dout,
  input  logic [NCREG-1:0]  creg_parity,
  output logic              sh_mask,
  output logic              sh_caldly,
  output logic              sh_trim,
  output logic              rot_serial,
  output logic              trim_load,
  input  logic              caldly_dout,
  input  logic              trim_dout,
  input  logic [15:0]       stat1,
  input  logic [15:0]       stat2,
  output logic [15:0]       mirror,
  output logic [4:0]        cregister,
  output logic              sc_unused,
  output logic              fc_unused,
  output logic              parity_err
);
  typedef enum logic [2:0] {C_IDLE, C_F1, C_F2, C_F3, C_F4, C_F5, C_F6} cst_e;
  typedef enum logic [3:0] {
    T_NONE, T_CREG, T_MASK, T_CALDLY, T_TRIM, T_STAT1, T_STAT2,
    T_TESTP, T_DATA, T_CALP
  } tgt_e;

  cst_e        st;
  logic [7:0]  sh;        // field being collected, LSB = latest bit
  logic [7:0]  nbits;     // bits collected in the current field
  logic [7:0]  remain;    // bits of the slow command still to come
  logic [5:0]  f5_q;
  logic        mine;      // command addressed to this chip
  logic        bit_in;

  // Read-back engine
  typedef enum logic [1:0] {RB_IDLE, RB_COPY, RB_SHIFT, RB_CHECK} rb_e;
  rb_e        rb_state;
  tgt_e       rb_tgt;
  creg_e      rb_creg;
  logic [4:0] rb_cnt;
  logic       rb_bit;

  // decode of field 5 (while its last bit arrives, and after)
  logic [5:0]  f5_cur;
  tgt_e        tgt;
  creg_e       creg;
  logic        is_read;

  always_comb begin
    tgt = T_NONE; creg = CR_CFG1;
    f5_cur  = (st == C_F5) ? {sh[4:0], bit_in} : f5_q;
    is_read = f5_cur[0];
    unique case (f5_cur[5:1])
      RA_CFG1:   begin tgt = T_CREG; creg = CR_CFG1;   end
      RA_CFG2:   begin tgt = T_CREG; creg = CR_CFG2;   end
      RA_THRESH: begin tgt = T_CREG; creg = CR_THRESH; end
      RA_BIAS1:  begin tgt = T_CREG; creg = CR_BIAS1;  end
      RA_BIAS2:  begin tgt = T_CREG; creg = CR_BIAS2;  end
      RA_BIAS3:  begin tgt = T_CREG; creg = CR_BIAS3;  end
      RA_DELAY:  begin tgt = T_CREG; creg = CR_DELAY;  end
      RA_CALAMP: begin tgt = T_CREG; creg = CR_CALAMP; end
      RA_MASK:   tgt = T_MASK;
      RA_CALDLY: tgt = T_CALDLY;
      RA_TRIM:   tgt = T_TRIM;
      RA_STAT1:  tgt = is_read ? T_STAT1 : T_NONE;
      RA_STAT2:  tgt = is_read ? T_STAT2 : T_NONE;
      5'b100_00: tgt = is_read ? T_NONE : T_TESTP;
      5'b101_00: tgt = is_read ? T_NONE : T_DATA;
      5'b110_00: tgt = is_read ? T_NONE : T_CALP;
      default:   tgt = T_NONE;
    endcase
  end

  assign bit_in = command;

  // Command parser
  logic wr_bit;   // a data bit of an addressed write arrives now
  logic cmd_end;  // last bit of a slow command arrives now
  assign wr_bit  = bc_en && st == C_F6 && mine && !is_read;
  assign cmd_end = bc_en && ((st == C_F6) || (st == C_F5 && nbits == 8'd5)) && remain == 8'd1;

  always_comb begin
    sdata   = bit_in;
    sh_creg = '0;
    sh_mask = 1'b0; sh_caldly = 1'b0; sh_trim = 1'b0;
    if (wr_bit) begin
      unique case (tgt)
        T_CREG:   sh_creg[creg] = 1'b1;
        T_MASK:   sh_mask   = 1'b1;
        T_CALDLY: sh_caldly = 1'b1;
        T_TRIM:   sh_trim   = 1'b1;
        default: ;
      endcase
    end
    // read-back of serial registers
    if (rb_state == RB_SHIFT) begin
      unique case (rb_tgt)
        T_CREG:   sh_creg[rb_creg] = 1'b1;
        T_CALDLY: sh_caldly = 1'b1;
        T_TRIM:   sh_trim   = 1'b1;
        default: ;
      endcase
    end
  end

  // Read-back engine

  assign rot_serial = (rb_state == RB_SHIFT);

  always_comb begin
    rb_bit = 1'b0;
    unique case (rb_tgt)
      T_CREG:   rb_bit = creg_dout[rb_creg];
      T_CALDLY: rb_bit = caldly_dout;
      T_TRIM:   rb_bit = trim_dout;
      default:  rb_bit = 1'b0;
    endcase
    rd_creg = '0;
    if (rb_state == RB_COPY && rb_tgt == T_CREG) rd_creg[rb_creg] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; sh <= '0; nbits <= '0; remain <= '0;
      f5_q <= '0; mine <= 1'b0; mode <= MODE_SENDID;
      l1 <= 1'b0; soft_reset <= 1'b0; bcr <= 1'b0; test_pulse <= 1'b0;
      cal_pulse <= 1'b0; ld_creg <= '0; trim_load <= 1'b0;
      sc_unused <= 1'b0; fc_unused <= 1'b0; parity_err <= 1'b0;
      rb_state <= RB_IDLE; rb_tgt <= T_NONE; rb_creg <= CR_CFG1; rb_cnt <= '0;
      mirror <= '0; cregister <= '0;
    end else begin
      l1 <= 1'b0; soft_reset <= 1'b0; bcr <= 1'b0; test_pulse <= 1'b0;
      cal_pulse <= 1'b0; ld_creg <= '0; trim_load <= 1'b0;
      sc_unused <= 1'b0; fc_unused <= 1'b0; parity_err <= 1'b0;

      if (bc_en) begin
        sh    <= {sh[6:0], bit_in};
        nbits <= nbits + 8'd1;
        unique case (st)
          C_IDLE: if (bit_in) begin st <= C_F1; nbits <= 8'd1; end
          C_F1: if (nbits == 8'd2) begin
            nbits <= '0;
            if ({sh[1:0], bit_in} == 3'b110)      begin l1 <= 1'b1; st <= C_IDLE; end
            else if ({sh[1:0], bit_in} == 3'b101) st <= C_F2;
            else begin fc_unused <= 1'b1; st <= C_IDLE; end
          end
          C_F2: if (nbits == 8'd3) begin
            nbits <= '0;
            unique case ({sh[2:0], bit_in})
              4'b0100: begin soft_reset <= 1'b1; st <= C_IDLE; end
              4'b0010: begin bcr <= 1'b1; st <= C_IDLE; end
              4'b0111: st <= C_F3;
              default: begin fc_unused <= 1'b1; st <= C_IDLE; end
            endcase
          end
          C_F3: if (nbits == 8'd7) begin
            nbits  <= '0;
            remain <= {sh[6:0], bit_in} + 8'd1;
            st     <= C_F4;
          end
          C_F4: begin
            remain <= remain - 8'd1;
            if (nbits == 8'd6) begin
              nbits  <= '0;
              mine   <= ({sh[5:0], bit_in} == id) || ({sh[5:0], bit_in} == GLOBAL_ID);
              st     <= C_F5;
            end
          end
          C_F5: begin
            remain <= remain - 8'd1;
            if (nbits == 8'd5) begin
              nbits <= '0;
              f5_q  <= {sh[4:0], bit_in};
              st    <= C_F6;
            end
          end
          C_F6: remain <= remain - 8'd1;
          default: st <= C_IDLE;
        endcase
        // a slow command ends when its announced length is used up
        if (cmd_end) st <= C_IDLE;
      end

      // actions at the end of an addressed slow command
      if (cmd_end && mine) begin
        if (tgt == T_NONE) sc_unused <= 1'b1;
        else if (!is_read) begin
          unique case (tgt)
            T_CREG:  begin ld_creg[creg] <= 1'b1; mode <= MODE_SENDID; end
            T_MASK, T_CALDLY: mode <= MODE_SENDID;
            T_TRIM:  begin trim_load <= 1'b1; mode <= MODE_SENDID; end
            T_TESTP: test_pulse <= 1'b1;
            T_DATA:  mode <= MODE_DATA;
            T_CALP:  cal_pulse <= 1'b1;
            default: ;
          endcase
        end else begin
          mode      <= MODE_READREG;
          cregister <= f5_cur[5:1];
          rb_tgt    <= tgt;
          rb_creg   <= creg;
          rb_cnt    <= '0;
          unique case (tgt)
            T_STAT1: mirror <= stat1;
            T_STAT2: mirror <= stat2;
            T_CREG:  rb_state <= RB_COPY;
            T_CALDLY, T_TRIM: rb_state <= RB_SHIFT;
            default: mirror <= '0;
          endcase
        end
      end

      // read-back sequencing
      unique case (rb_state)
        RB_COPY:  rb_state <= RB_SHIFT;
        RB_SHIFT: begin
          mirror <= {mirror[14:0], rb_bit};
          rb_cnt <= rb_cnt + 5'd1;
          if (rb_cnt == 5'd15) rb_state <= (rb_tgt == T_CREG) ? RB_CHECK : RB_IDLE;
        end
        RB_CHECK: begin
          if (^mirror != creg_parity[rb_creg]) parity_err <= 1'b1;
          rb_state <= RB_IDLE;
        end
        default: ;
      endcase
    end
  end
endmodule

// Data compression logic. When the readout buffer holds an event
// (dataavail) and no event is being processed, it reads the event's three
// 180-bit words (buffrd high for three clocks) and regroups them from three
// 128-bit samples into 128 three-bit hit patterns {previous, current, next}
// (oldest sample in bit 2). It then presents, one at a time, the channels
// whose pattern meets the criterion selected by mode (Table 3-7: hit 1XX |
// X1X | XX1, level X1X, edge 01X, test XXX):
//   datavalid=1: ch/hit show a hit channel; adj=1 if the next hit channel is
//                ch+1; end=1 if this is the last one. "next" advances.
//   datavalid=0, end=1: all hits read out or none found; "next" releases the
//                event and the block returns to idle.
//   overflowout=1: the event is flushed because the buffer overflowed;
//                "next" releases it.
// In send-ID or read-register mode the event is read and flushed without a
// scan (end=1 at once). Priority: send-ID, read-register, overflow.
// The next matching channel is found by a 128-bit priority search in one
// clock, so "next" is answered on the following clock. ev_l1/ev_bc are the
// L1 count of the event and the BC count of its centre sample, for the
// module header. Output encoding and the criteria follow the specification;
// the one-clock search and the release-by-next handshake are local choices.
module abcn_data_compression
  import abcn_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  input  logic [179:0] i,
  input  logic         overflow,
  input  logic         sendid,
  input  logic         readreg,
  input  logic         dataavail,
  input  crit_e        mode,
  input  logic         next,
  output logic         buffrd,
  output logic         overflowout,
  output logic         adj,
  output logic [6:0]   ch,
  output logic [2:0]   hit,
  output logic         datavalid,
  output logic         end_o,
  output logic         busy,
  output logic [3:0]   ev_l1,
  output logic [7:0]   ev_bc
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_SCAN, S_PRES, S_DONE, S_OVF} st_e;
  st_e         st;
  logic [1:0]  rcnt, ccnt;
  logic        rd_q;
  logic [N-1:0] s0, s1, s2;       // oldest, centre, newest sample
  logic [N-1:0] match, after_cur;
  logic [6:0]  cur, first_idx, next_idx;
  logic        first_found, next_found;

  // pattern match per channel
  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      unique case (mode)
        CRIT_HIT:   match[c] = s0[c] | s1[c] | s2[c];
        CRIT_LEVEL: match[c] = s1[c];
        CRIT_EDGE:  match[c] = ~s0[c] & s1[c];
        default:    match[c] = 1'b1;
      endcase
    end
    after_cur = match & ~((N'(2) << cur) - N'(1));   // channels above cur
    first_found = 1'b0; first_idx = '0;
    next_found  = 1'b0; next_idx  = '0;
    for (int c = N - 1; c >= 0; c--) begin
      if (match[c])     begin first_found = 1'b1; first_idx = 7'(c); end
      if (after_cur[c]) begin next_found  = 1'b1; next_idx  = 7'(c); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; rcnt <= '0; ccnt <= '0; rd_q <= 1'b0; cur <= '0;
      s0 <= '0; s1 <= '0; s2 <= '0; ev_l1 <= '0; ev_bc <= '0;
    end else if (srst) begin
      st <= S_IDLE; rcnt <= '0; ccnt <= '0; rd_q <= 1'b0; cur <= '0;
    end else begin
      rd_q <= buffrd;
      if (rd_q) begin
        unique case (ccnt)
          2'd0:    s0 <= i[N-1:0];
          2'd1:    begin s1 <= i[N-1:0]; ev_l1 <= i[131:128]; ev_bc <= i[139:132]; end
          default: s2 <= i[N-1:0];
        endcase
        ccnt <= (ccnt == 2'd2) ? 2'd0 : ccnt + 2'd1;
      end
      unique case (st)
        S_IDLE: if (dataavail) begin st <= S_READ; rcnt <= 2'd0; end
        S_READ: begin
          if (rcnt != 2'd3) rcnt <= rcnt + 2'd1;
          if (rd_q && ccnt == 2'd2) begin
            if (sendid || readreg) st <= S_DONE;
            else if (overflow)     st <= S_OVF;
            else                   st <= S_SCAN;
          end
        end
        S_SCAN: if (first_found) begin cur <= first_idx; st <= S_PRES; end
                else st <= S_DONE;
        S_PRES: if (next) begin
                  if (next_found) cur <= next_idx;
                  else            st  <= S_DONE;
                end
        S_DONE, S_OVF: if (next) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    buffrd      = (st == S_READ) && (rcnt < 2'd3);
    busy        = (st != S_IDLE);
    datavalid   = (st == S_PRES);
    end_o       = (st == S_DONE) || ((st == S_PRES) && !next_found);
    overflowout = (st == S_OVF);
    ch          = cur;
    hit         = {s0[cur], s1[cur], s2[cur]};
    adj         = (st == S_PRES) && next_found && (next_idx == cur + 7'd1);
  end
endmodule

// dwt2d_ctrl: pass sequencer and address generator of the multi-level 2-D DWT.
//
// A transform of 'levels' levels is a sequence of 2*levels passes. Pass p works
// on the L x L low-low quadrant (L = N >> level, level = p/2): even passes filter
// rows, odd passes filter columns. Row passes read memory A and write memory B,
// column passes read B and write A, so the finished transform ends up in A and
// a pass never overwrites samples it still has to read.
//
// Each line is sent to the 1-D engine as L/2 + 4 sample pairs, pair positions
// -2 .. L/2+1, with whole-sample symmetric extension at both ends
// (x[-j] = x[j], x[L-1+j] = x[L-1-j]). A one-entry stage (the memory read
// register plus ireg_valid) sits between memory and engine and follows a
// valid/ready handshake, so the same controller serves the bit-parallel engine
// (always ready) and the digit-serial one (ready once per word slot). Each pair
// carries a tag {line, m}; the engine returns the results of position m-4 with
// tag m, and the controller writes them when m >= 4: the low-pass value to
// position m-4 and the high-pass value to position L/2 + m-4 of the same line
// (Mallat layout). A pass ends when all L*L/2 result pairs are written, then the
// next pass starts, so the engine is empty at every pass boundary.
//
// For the digit-serial engine it also supplies, per pass, the number of integer
// digits of the input words and the iteration count that keeps 'precision'
// fraction digits (dwt_pkg::pass_ib, dwt_pkg::ds_iter).
module dwt2d_ctrl #(
  parameter int N          = dwt_pkg::N_DEF,
  parameter int MAX_LEVELS = dwt_pkg::LEVELS_DEF,
  parameter int DATA_W     = dwt_pkg::data_w_for(MAX_LEVELS),
  parameter int ITER_MAX   = dwt_pkg::iter_max_for(MAX_LEVELS),
  parameter int AW         = $clog2(N * N),
  parameter int LW         = $clog2(N),
  parameter int TAG_W      = 2 * LW,
  parameter int LVW        = $clog2(MAX_LEVELS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LVW-1:0]    levels,
  input  logic [3:0]        precision,
  output logic              busy,
  output logic              done,
  // pair read from the source memory (bank 0 = A, 1 = B)
  output logic              rd_en,
  output logic              rd_bank,
  output logic [AW-1:0]     rd_addr0,
  output logic [AW-1:0]     rd_addr1,
  input  logic [DATA_W-1:0] rd_data0,
  input  logic [DATA_W-1:0] rd_data1,
  // result write to the destination memory
  output logic              wr_en,
  output logic              wr_bank,
  output logic [AW-1:0]     wr_addr0,
  output logic [AW-1:0]     wr_addr1,
  output logic [DATA_W-1:0] wr_data0,
  output logic [DATA_W-1:0] wr_data1,
  // 1-D engine
  input  logic              eng_in_ready,
  output logic              eng_in_valid,
  output logic [DATA_W-1:0] eng_in_even,
  output logic [DATA_W-1:0] eng_in_odd,
  output logic [TAG_W-1:0]  eng_in_tag,
  input  logic              eng_out_valid,
  input  logic [DATA_W-1:0] eng_out_low,
  input  logic [DATA_W-1:0] eng_out_high,
  input  logic [TAG_W-1:0]  eng_out_tag,
  output logic [5:0]        eng_iter,
  output logic [3:0]        eng_in_ib
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_t;
  state_t state;

  logic [3:0]    pass;          // 0 .. 2*MAX_LEVELS-1
  logic [LW-1:0] line;
  logic [LW-1:0] m;
  logic          ireg_valid;
  logic [TAG_W-1:0] ireg_tag;
  logic [AW:0]   wr_count;
  logic [LVW-1:0] levels_q;
  logic [3:0]    prec_q;

  logic          dir;
  logic [LW:0]   len;           // L
  logic [LW:0]   half;          // L/2
  logic [AW:0]   pass_writes;
  logic          can_issue, issue;

  assign dir         = pass[0];
  assign len         = (LW+1)'(N) >> pass[3:1];
  assign half        = len >> 1;
  assign pass_writes = (AW+1)'(len) * (AW+1)'(half);
  assign can_issue   = !ireg_valid || eng_in_ready;
  assign issue       = (state == S_ISSUE) && can_issue;
  assign busy        = (state != S_IDLE);

  // Mirror a signed position into 0..len-1.
  function automatic logic [LW-1:0] mirror(logic signed [LW+2:0] j, logic [LW:0] n);
    logic signed [LW+2:0] r;
    r = j;
    if (r < 0) r = -r;
    if (r > $signed({2'b00, n}) - 1) r = 2 * ($signed({2'b00, n}) - 1) - r;
    return r[LW-1:0];
  endfunction

  function automatic logic [AW-1:0] addr_of(logic d, logic [LW-1:0] ln, logic [LW-1:0] pos);
    return d ? AW'(pos) * AW'(N) + AW'(ln) : AW'(ln) * AW'(N) + AW'(pos);
  endfunction

  logic signed [LW+2:0] pos_even;
  logic [LW-1:0] p0, p1;
  assign pos_even = 2 * ($signed({3'b000, m}) - 2);
  assign p0 = mirror(pos_even, len);
  assign p1 = mirror(pos_even + 1, len);

  assign rd_en    = issue;
  assign rd_bank  = dir;
  assign rd_addr0 = addr_of(dir, line, p0);
  assign rd_addr1 = addr_of(dir, line, p1);

  assign eng_in_valid = ireg_valid;
  assign eng_in_even  = rd_data0;
  assign eng_in_odd   = rd_data1;
  assign eng_in_tag   = ireg_tag;
  assign eng_in_ib    = 4'(dwt_pkg::pass_ib(int'(pass)));
  assign eng_iter     = 6'(dwt_pkg::ds_iter(int'(pass), int'(prec_q), ITER_MAX));

  // Result write-back.
  logic [LW-1:0] o_line, o_m, o_n;
  assign o_line   = eng_out_tag[TAG_W-1:LW];
  assign o_m      = eng_out_tag[LW-1:0];
  assign o_n      = o_m - LW'(4);
  assign wr_en    = eng_out_valid && (o_m >= LW'(4)) && busy;
  assign wr_bank  = !dir;
  assign wr_addr0 = addr_of(dir, o_line, o_n);
  assign wr_addr1 = addr_of(dir, o_line, o_n + LW'(half));
  assign wr_data0 = eng_out_low;
  assign wr_data1 = eng_out_high;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pass       <= '0;
      line       <= '0;
      m          <= '0;
      ireg_valid <= 1'b0;
      ireg_tag   <= '0;
      wr_count   <= '0;
      levels_q   <= LVW'(1);
      prec_q     <= 4'd8;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (issue) begin
        ireg_valid <= 1'b1;
        ireg_tag   <= {line, m};
      end else if (eng_in_ready) begin
        ireg_valid <= 1'b0;
      end
      if (wr_en) wr_count <= wr_count + 1'b1;

      case (state)
        S_IDLE: if (start) begin
          levels_q <= (levels == '0) ? LVW'(1) :
                      (levels >= LVW'(MAX_LEVELS)) ? LVW'(MAX_LEVELS) : levels;
          prec_q   <= precision;
          pass     <= '0;
          line     <= '0;
          m        <= '0;
          wr_count <= '0;
          state    <= S_ISSUE;
        end
        S_ISSUE: if (issue) begin
          if ({1'b0, m} == half + 3) begin
            m <= '0;
            if ({1'b0, line} == len - 1) begin
              line  <= '0;
              state <= S_DRAIN;
            end else begin
              line <= line + 1'b1;
            end
          end else begin
            m <= m + 1'b1;
          end
        end
        S_DRAIN: if (wr_count == pass_writes) begin
          wr_count <= '0;
          if (pass == 4'(2 * levels_q - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            pass  <= pass + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The write counter must never pass the number of results of a pass.
  assert property (@(posedge clk) disable iff (!rst_n) wr_count <= pass_writes)
    else $error("dwt2d_ctrl: more results than expected in pass %0d", pass);
endmodule

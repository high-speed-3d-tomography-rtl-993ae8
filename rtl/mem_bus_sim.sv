// mem_bus_sim: memory bus with settable latency and bandwidth.
//
// It sits between the root cache and the external SDRAM and makes every line
// read cost the time of the document's memory model,
//   t_mem = N_line * (l_mem + (S_line - 1) / BW_mem),
// with LAT = l_mem cycles and a bandwidth of one WORD_W-bit word every
// BEAT cycles. Lines are served one after the other: a request is accepted
// only when the bus is idle; if it is accepted in cycle T, the first word is
// on mrsp in cycle T+1+LAT, the following LINE-1 words every BEAT cycles, and
// the bus is ready again in the cycle of the last word. A line thus occupies
// the bus 1 + LAT + (LINE-1)*BEAT cycles, eq. (8) rounded up.
// It also turns the word coordinate (angle index,
// bin pair, plane) into the linear word address of the sinogram,
//   addr = (a * NV + v) * NUP + up.
//
// External side: ext_rd/ext_addr read one word; ext_rdata must hold that word
// on the next cycle (a synchronous-read memory). Cache side: mreq_* (line
// request, accepted when mreq_ready) and mrsp_* (one word per beat, with its
// coordinate; mrsp_last marks the end of the line).
// Following the document: the model of eq. (8), 5 cycles of latency and
// 4 bytes/cycle of the 200 MHz prototype. This design's choices: the
// synchronous-read external port and the word/line framing.
module mem_bus_sim
  import bp_pkg::*;
#(
  parameter int LAT    = 5,        // l_mem, cycles (>= 1)
  parameter int BEAT   = 1,        // cycles per word (S_word / BW_mem)
  parameter int LINE   = 8,        // words per line
  parameter int NUP    = 144,
  parameter int NV     = 63,
  parameter int ADDR_W = 23
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mreq_valid,
  output logic              mreq_ready,
  input  wcoord_t           mreq_crd,
  output logic              mrsp_valid,
  output wcoord_t           mrsp_crd,
  output logic [WORD_W-1:0] mrsp_data,
  output logic              mrsp_last,
  output logic              ext_rd,
  output logic [ADDR_W-1:0] ext_addr,
  input  logic [WORD_W-1:0] ext_rdata
);
  initial assert (LAT >= 1 && BEAT >= 1 && LINE >= 1) else $error("bad bus timing");

  typedef enum logic [1:0] {S_IDLE, S_LAT, S_BURST} state_t;
  state_t      state;
  wcoord_t     line;
  logic [15:0] cnt;        // cycles left in the current phase
  logic [15:0] word;       // word of the line being read
  logic        rd_q, last_q;
  wcoord_t     crd_q;

  assign mreq_ready = (state == S_IDLE);

  // the read of word i is issued one cycle before it is due on mrsp
  always_comb begin
    ext_rd = (state == S_LAT && cnt == 16'd1) || (state == S_BURST && cnt == 16'd1);
    ext_addr = ADDR_W'((int'(line.a) * NV + int'(line.v)) * NUP + int'(line.up) + int'(word));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      word   <= '0;
      line   <= '0;
      rd_q   <= 1'b0;
      last_q <= 1'b0;
      crd_q  <= '0;
    end else begin
      rd_q   <= ext_rd;
      last_q <= ext_rd && (int'(word) == LINE - 1);
      if (ext_rd) begin
        crd_q    <= line;
        crd_q.up <= line.up + crd_t'(word);
      end
      case (state)
        S_IDLE: if (mreq_valid) begin
          line  <= mreq_crd;
          word  <= '0;
          cnt   <= 16'(LAT);
          state <= S_LAT;
        end
        S_LAT: if (cnt == 16'd1) begin
          if (LINE == 1) state <= S_IDLE;
          else begin
            state <= S_BURST;
            word  <= word + 1'b1;
            cnt   <= 16'(BEAT);
          end
        end else cnt <= cnt - 1'b1;
        S_BURST: if (cnt == 16'd1) begin
          if (int'(word) == LINE - 1) state <= S_IDLE;
          else begin
            word <= word + 1'b1;
            cnt  <= 16'(BEAT);
          end
        end else cnt <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mrsp_valid = rd_q;
  assign mrsp_crd   = crd_q;
  assign mrsp_data  = ext_rdata;
  assign mrsp_last  = last_q;
endmodule

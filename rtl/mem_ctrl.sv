// mem_ctrl: front end of the shared memory controller, between the L2 and
// the DRAM controller back end.
// It forwards one line request at a time to the DRAM side and returns the
// response to the L2. With const_en high every response is held back until
// a fixed number of cycles after the request (LAT_RD for reads, LAT_WR for
// writes), so the response time no longer depends on the DRAM state (open
// rows, refresh) or on earlier requests; with const_en low the DRAM response
// is passed on as soon as it arrives (the baseline behaviour). If the DRAM
// answers after the fixed latency the response goes out at once and `late`
// pulses, telling that LAT_RD/LAT_WR were set too low.
// The padding to a worst-case latency per request type follows the document;
// the latency values, the handshake and the absence of the baseline's
// two-burst write FIFO are this design's choices.
// Interface: req/we/addr/wdata are held until done pulses (rdata valid with
// done); the request is registered when accepted and drives the DRAM side
// from the next cycle. The DRAM side uses the same convention with dreq and ddone.
module mem_ctrl #(
  parameter int unsigned LW     = 512,
  parameter int unsigned LAT_RD = 24,
  parameter int unsigned LAT_WR = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          const_en,
  input  logic          req,
  input  logic          we,
  input  logic [31:0]   addr,
  input  logic [LW-1:0] wdata,
  output logic          done,
  output logic [LW-1:0] rdata,
  output logic          late,
  output logic          dreq,
  output logic          dwe,
  output logic [31:0]   daddr,
  output logic [LW-1:0] dwdata,
  input  logic          ddone,
  input  logic [LW-1:0] drdata
);
  typedef enum logic [1:0] {S_IDLE, S_DRAM, S_HOLD, S_DONE} state_e;
  state_e state;
  logic [7:0]    cnt;
  logic [LW-1:0] data_q;
  logic [7:0]    target;
  logic          we_q;             // request captured when accepted
  logic [31:0]   addr_q;
  logic [LW-1:0] wdata_q;
  assign target = we_q ? 8'(LAT_WR) : 8'(LAT_RD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; data_q <= '0;
      we_q <= 1'b0; addr_q <= '0; wdata_q <= '0;
    end else begin
      if (state != S_IDLE) cnt <= cnt + 1'b1;
      case (state)
        S_IDLE: if (req) begin
          state <= S_DRAM; cnt <= 8'd1;
          we_q <= we; addr_q <= addr; wdata_q <= wdata;
        end
        S_DRAM: if (ddone) begin
          data_q <= drdata;
          state  <= (!const_en || cnt + 8'd1 >= target) ? S_DONE : S_HOLD;
        end
        S_HOLD: if (cnt + 8'd1 >= target) state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign dreq   = (state == S_DRAM);
  assign dwe    = we_q;
  assign daddr  = addr_q;
  assign dwdata = wdata_q;
  assign done   = (state == S_DONE);
  assign rdata  = data_q;
  assign late   = done && const_en && cnt > target;
endmodule

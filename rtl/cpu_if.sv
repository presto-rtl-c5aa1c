// cpu_if: AXI4-Lite slave giving the host single-word access to PE buffers.
//
// The host reads or writes one 32-bit coefficient per transaction. Word
// address (byte address bits [16:2]) = {pe[4:0], pbuf, entry[4:0], bank[3:0]}.
// A write needs AW and W together; a read needs AR. The request is held on
// req/req_we/req_addr/req_wdata until the MEM FSM answers with ack (and, for
// reads, ack_rdata), then the B or R response is returned. One transaction at
// a time; responses are always OKAY. wstrb is ignored (full words only).
// The 32-bit AXI width is the document's; the protocol subset and the address
// map are this design's.
module cpu_if (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [31:0] s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // word request to the MEM FSM
  output logic        req,
  output logic        req_we,
  output logic [14:0] req_addr,
  output logic [31:0] req_wdata,
  input  logic        ack,
  input  logic [31:0] ack_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_BRESP, S_RRESP} state_e;
  state_e state;

  assign s_awready = (state == S_IDLE) && s_awvalid && s_wvalid;
  assign s_wready  = s_awready;
  assign s_arready = (state == S_IDLE) && !(s_awvalid && s_wvalid) && s_arvalid;
  assign s_bvalid  = (state == S_BRESP);
  assign s_rvalid  = (state == S_RRESP);
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign req       = (state == S_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; req_we <= 1'b0; req_addr <= '0; req_wdata <= '0; s_rdata <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (s_awready) begin
            state <= S_REQ; req_we <= 1'b1; req_addr <= s_awaddr[16:2]; req_wdata <= s_wdata;
          end else if (s_arready) begin
            state <= S_REQ; req_we <= 1'b0; req_addr <= s_araddr[16:2];
          end
        S_REQ:
          if (ack) begin
            state <= req_we ? S_BRESP : S_RRESP;
            if (!req_we) s_rdata <= ack_rdata;
          end
        S_BRESP: if (s_bready) state <= S_IDLE;
        default: if (s_rready) state <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a response, once valid, stays valid until it is accepted.
  property p_hold(v, r);
    @(posedge clk) disable iff (!rst_n) v && !r |=> v;
  endproperty
  a_bhold: assert property (p_hold(s_bvalid, s_bready));
  a_rhold: assert property (p_hold(s_rvalid, s_rready));

  logic unused;
  assign unused = ^{s_wstrb, s_awaddr[31:17], s_awaddr[1:0], s_araddr[31:17], s_araddr[1:0]};
endmodule

// axi_master: AxiMaster, issues one AXI3 write burst per BurstIf transaction.
//
// Address phase: the BurstIf request is passed straight onto AW (INCR burst,
// 8-byte beats, all byte strobes on, fixed ID).  Data phase: the BurstIf
// beats are passed onto W.  Response phase: the B response is taken and
// done is pulsed back.  There is no buffering: the memory channel holds the
// data.  The ID and the cache attribute are parameters; their values, like
// the choice to ignore the response code, are this design's.
module axi_master
  import dla_pkg::*;
#(
  parameter logic [2:0] ID      = 3'd0,
  parameter logic [3:0] AWCACHE = 4'b1111   // coherent write-back access
) (
  input  logic        clk,
  input  logic        rst_n,
  burst_if.slave      bus,
  output axi_wr_req_t axi_req,
  input  axi_wr_rsp_t axi_rsp
);
  typedef enum logic [1:0] {A_ADDR, A_DATA, A_RESP} astate_t;
  astate_t state;

  always_comb begin
    axi_req = '0;
    axi_req.awid    = ID;
    axi_req.wid     = ID;
    axi_req.awaddr  = bus.req_addr;
    axi_req.awlen   = bus.req_len;
    axi_req.awsize  = 3'd3;
    axi_req.awburst = 2'b01;
    axi_req.awcache = AWCACHE;
    axi_req.awvalid = state == A_ADDR && bus.req_valid;
    axi_req.wdata   = bus.wdata;
    axi_req.wstrb   = 8'hFF;
    axi_req.wlast   = bus.wlast;
    axi_req.wvalid  = state == A_DATA && bus.wvalid;
    axi_req.bready  = state == A_RESP;
    bus.req_ready   = state == A_ADDR && axi_rsp.awready;
    bus.wready      = state == A_DATA && axi_rsp.wready;
    bus.done        = state == A_RESP && axi_rsp.bvalid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= A_ADDR;
    else case (state)
      A_ADDR: if (bus.req_valid && axi_rsp.awready) state <= A_DATA;
      A_DATA: if (bus.wvalid && axi_rsp.wready && bus.wlast) state <= A_RESP;
      default: if (axi_rsp.bvalid) state <= A_ADDR;
    endcase
  end
endmodule

// burst_if: BurstIf, the bus between a memory channel and an AXI master.
//
// One transaction at a time: the master side (a memory channel) raises
// req_valid with the byte address and the burst length (beats minus one,
// up to 16 beats of 64 bits); the request is taken when req_ready is high.
// The beats then follow on wvalid/wready/wdata with wlast on the final
// beat, and done pulses for one cycle when the memory write has completed.
// A new request may only be raised after done.
interface burst_if;
  logic        req_valid;
  logic        req_ready;
  logic [31:0] req_addr;
  logic [3:0]  req_len;
  logic        wvalid;
  logic        wready;
  logic [63:0] wdata;
  logic        wlast;
  logic        done;

  modport master (output req_valid, req_addr, req_len, wvalid, wdata, wlast,
                  input req_ready, wready, done);
  modport slave  (input req_valid, req_addr, req_len, wvalid, wdata, wlast,
                  output req_ready, wready, done);
endinterface

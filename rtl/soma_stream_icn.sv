// soma_stream_icn: stream manager interconnect between the data stream
// manager (DSM) and the stream register files of the dispatchers.
//
// Load direction: the DSM names a destination dispatcher, or the broadcast
// ID, for the element it is about to fetch. ld_ready tells it whether that
// destination can take it (for a broadcast every dispatcher must be ready,
// which synchronises them implicitly). One cycle later the fetched element is
// delivered to the addressed input bank(s).
// Store direction: the DSM names a source dispatcher; its output bank head is
// returned with a valid flag and a pop travels back to that dispatcher only.
// The dispatchers are the requesters: their bank status signals (room in the
// input bank being filled, data in the output bank being drained) decide when
// transfers take place.
// Timing: all paths are combinational.
// One element bus goes to every input bank; d_in_valid selects the banks
// that take it.
// Following the source design: high-bandwidth bidirectional network between
// one DSM and M dispatchers, with individual or broadcast transfers. Own
// choice: the DSM names the dispatcher with each transfer.
module soma_stream_icn import soma_pkg::*; #(
  parameter int unsigned ND = 8
) (
  // load: readiness of the destination chosen for the next fetch
  input  logic [DID_W-1:0] ld_req_dest,
  output logic             ld_ready,
  // load: delivery
  input  logic             ld_valid,
  input  logic [DID_W-1:0] ld_dest,
  input  stream_t          ld_elem,
  // store
  input  logic [DID_W-1:0] st_src,
  output logic             st_valid,
  output stream_t          st_elem,
  input  logic             st_pop,
  // dispatcher side
  input  logic [ND-1:0]    d_in_ready,
  output logic [ND-1:0]    d_in_valid,
  output stream_t          d_in_elem,
  input  logic [ND-1:0]    d_out_valid,
  input  stream_t          d_out_elem [ND],
  output logic [ND-1:0]    d_out_pop
);
  always_comb begin
    if (ld_req_dest == DID_BCAST) ld_ready = &d_in_ready;
    else if (int'(ld_req_dest) < ND) ld_ready = d_in_ready[$clog2(ND > 1 ? ND : 2)'(ld_req_dest)];
    else ld_ready = 1'b0;

    d_in_elem = ld_elem;
    for (int i = 0; i < ND; i++)
      d_in_valid[i] = ld_valid && (ld_dest == DID_BCAST || int'(ld_dest) == i);

    st_valid = 1'b0;
    st_elem  = '0;
    for (int i = 0; i < ND; i++) begin
      d_out_pop[i] = st_pop && int'(st_src) == i;
      if (int'(st_src) == i) begin
        st_valid = d_out_valid[i];
        st_elem  = d_out_elem[i];
      end
    end
  end
endmodule

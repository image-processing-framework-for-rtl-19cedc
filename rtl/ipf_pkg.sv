// ipf_pkg: types and constants shared by the image processing framework.
//
// The framework joins modules by streams: a stream is a one-way, word-wise
// synchronised data path (a data word plus a strobe that marks the cycle in
// which the word is present). Everything else about a stream, such as image
// size and scan order, is implicit and agreed on at build time, so a stream
// carries no frame or line markers.
//
// Modules that talk to the external RAM do so over one system bus. This
// design's bus is a single-beat request/response bus: a master holds a request
// (valid, write enable, word address, write data, lock) until the slave
// raises ready; read data come back later, in request order, with rvalid.
// "lock" asks the interconnect to keep the grant for the next beat, which is
// how a memory data sink keeps a packet together. The bus protocol and all
// widths here are choices of this design; the image size (768x500) and the
// 8-bit pixel are the camera set-up of the vision system built with it.
package ipf_pkg;

  // Camera image, as delivered by the live sources
  parameter int unsigned IMG_W = 768;
  parameter int unsigned IMG_H = 500;
  parameter int unsigned PIX_W = 8;

  // System bus
  parameter int unsigned BUS_AW = 32;   // word address
  parameter int unsigned BUS_DW = 32;   // data word

  typedef logic [PIX_W-1:0] pix_t;

  // Pixel with the "invalid" mark a synchronising source can set
  typedef struct packed {
    logic invalid;
    pix_t value;
  } mpix_t;

  typedef struct packed {
    logic              valid;
    logic              we;
    logic              lock;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              ready;
    logic              rvalid;
    logic [BUS_DW-1:0] rdata;
  } bus_rsp_t;

  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage

000000
000400
000410
000401
000420
2154f8
000411
30746e
000430
000402
3e85d4
3b2cda
000421
2ab4ac
30f47e
215cf9
000440
335597
000412
206c9d
3f05e4
307c6f
3bacea
20f5b6
000431
3d94bc
2b34bc
000403
31748e
2e148e
3e8dd5
2645d5
000450
3b34db
33d5a7
2d9da7
000422
35ccad
20ecad
2abcad
3f85f4
2f85f4
30fc7f
207c7f
3c2cfa
2164fa
2175c6
300441
000441
200441
3e14cc
2d1ccc
2bb4cc
300413
000413
200413
31f49e
20749e
2e949e
3275e5
3f0de5
2f05e5
26c5e5
300460
000460
200460
3bb4eb
3d1ceb
3455b7
20fdb7
2e1db7
300432
000432
200432
364cbd
3d9cbd
216cbd
2e94bd
2b3cbd
308404
300404
000404
200404
208404
317c8f
307c8f
20fc8f
2e1c8f
21fc8f
3b3dd6
3e95d6
3e85d6
21f5d6
264dd6
308451
300451
000451
200451
208451
3b3cdc
3e94dc
393cdc
2d9cdc
264cdc
2c34dc
300c23
308423
300423
000423
200423
208423
35d4ae
3274ae
3364ae
20f4ae
26c4ae
2f14ae
2464ae
32f5f5
3745f5
3f8df5
3f85f5
2f85f5
2f8df5
2745f5
300c70
308470
300470
000470
200470
208470
200c70
3c34fb
364cfb
3d9cfb
2544fb
34d5c7
25c5c7
217dc7
236dc7
2e9dc7
300c42
308442
300442
000442
200442
208442
200c42
36cccd
31fccd
3e1ccd
34d4cd
21eccd
2d24cd
2f14cd
2e9ccd
2bbccd
37c414
310414
300c14
308414
300414
000414
200414
208414
200c14
210414
36cc9f
31fc9f
3e1c9f
30fc9f
207c9f
217c9f
236c9f
2e9c9f
2bbc9f
227c9f
327de6
3bbde6
3465e6
3f15e6
36c5e6
3f05e6
2f0de6
2275e6
25d5e6
26cde6
23ede6
310461
300c61
308461
300461
000461
200461
208461
200c61
210461
27c461
3bbcec
3e9cec
3f14ec
3d24ec
39bcec
2b34ec
2e1cec
21fcec
26ccec
23ecec
2cb4ec
2f1cec
308c33
37c433
310433
300c33
308433
300433
000433
200433
208433
200c33
210433
27c433
3654be
3f94be
32f4be
3da4be
33e4be
3e14be
2174be
2bb4be
2744be
2e9cbe
2f94be
227cbe
24e4be
274cbe
337405
308c05
37c405
310405
300c05
308405
300405
000405
200405
208405
200c05
210405
27c405
208c05
308c80
37c480
310480
300c80
308480
300480
000480
200480
208480
200c80
210480
27c480
208c80
237480
218480
35ddd7
374dd7
34e5d7
327dd7
3bbdd7
3e9dd7
336dd7
3555d7
3e8dd7
2645d7
23e5d7
21fdd7
22f5d7
23edd7
2655d7
2f1dd7
337452
308c52
37c452
310452
300c52
308452
300452
000452
200452
208452
200c52
210452
27c452
208c52
237452
374cdd
34e4dd
327cdd
3f94dd
3e9cdd
336cdd
3554dd
32e4dd
226cdd
23e4dd
2da4dd
22f4dd
2f94dd
2654dd
2f1cdd
2dacdd
2c3cdd
246cdd
3ea424
301424
318424
337424
308c24
37c424
310424
300c24
308424
300424
000424
200424
208424
200c24
210424
27c424
208c24
237424
218424
35dcaf
374caf
34e4af
327caf
3bbcaf
3e9caf
336caf
317caf
307caf
20fcaf
2e1caf
21fcaf
26ccaf
23ecaf
2cb4af
2f1caf
2dacaf
2c3caf
246caf
22fcaf
3d35f6
32fdf6
346df6
3c3df6
374df6
34e5f6
3655f6
3f95f6
32f5f6
3745f6
3f8df6
3f85f6
2f85f6
2f8df6
2745f6
22f5f6
2f95f6
2655f6
24e5f6
274df6
2c3df6
246df6
301471
318471
337471
308c71
37c471
310471
300c71
308471
300471
000471
200471
208471
200c71
210471
27c471
208c71
237471
218471
201471
2ea471
346cfc
3c3cfc
3dacfc
3f1cfc
3654fc
3f94fc
32f4fc
3da4fc
33e4fc
3a3cfc
254cfc
2bb4fc
2744fc
2e9cfc
2f94fc
227cfc
24e4fc
274cfc
25dcfc
246cfc
22fcfc
2d34fc
2564fc
2f9cfc
356443
310c43
36d443
3ea443
301443
318443
337443
308c43
37c443
310443
300c43
308443
300443
000443
200443
208443
200c43
210443
27c443
208c43
237443
218443
201443
2ea443
26d443
36d4ce
3ea4ce
3014ce
3184ce
3374ce
308cce
3e24ce
355cce
3464ce
34dcce
3e94ce
3074ce
21f4ce
2cacce
2c34ce
2d2cce
27c4ce
208cce
2f1cce
2184ce
2014ce
2ea4ce
22fcce
210cce
2564ce
23f4ce
27ccce
37cc15
33f415
356415
310c15
36d415
3ea415
301415
318415
337415
308c15
37c415
310415
300c15
308415
300415
000415
200415
208415
200c15
210415
27c415
208c15
237415
218415
201415
2ea415
26d415
210c15
256415
310c90
36d490
3ea490
301490
318490
337490
308c90
37c490
310490
300c90
308490
300490
000490
